// vme2eb_rx: the ROD-FPGA end of the VME link ("VME2EB RX System"). The VME
// FPGA is master of the link; it writes and reads the configuration and
// monitoring registers of the event builder and reads the VME FIFO.
//
// Commands arrive as 16-bit words (from the link receiver, through a FIFO
// that absorbs the phase between the two FPGAs). A command word is
// {rw, 7'b0, addr[7:0]}; rw = 0 is a write followed by two data words
// (bits 31:16, then 15:0); rw = 1 is a read, answered with two 16-bit words
// in the same order on the reply port. Register map:
//   0x00 CTRL        bit 0 enables the Frame Maker (reset 1)      RW
//   0x01 BOARD_ID    source ID written into the ROD header         RW
//   0x02 RUN_NUMBER                                                RW
//   0x03 RX_TIMEOUT  idle cycles before an RX side is closed       RW
//   0x08 FRAMES      frames built                                  RO
//   0x09 ERR_FRAMES  frames with any error flag                    RO
//   0x0A LAST_FLAGS  error flags of the last frame                 RO
//   0x0B LAST_TIME   build time of the last frame (clock cycles)   RO
//   0x0C MAX_TIME    longest build time seen                       RO
//   0x0D VME_DROPS   words not copied because the VME FIFO was full RO
//   0x10 VME_DATA    head of the VME FIFO; reading pops it         RO
//   0x11 VME_STAT    bit 0 VME FIFO empty, bit 1 head word is last RO
// Other addresses read as 0 and ignore writes. All in the event builder
// clock domain; one word is consumed or produced per clock at most.
// The registers for configuration and monitoring and the master/slave roles
// follow the document; the word protocol and the register map are this
// design's.
module vme2eb_rx
  import rod_pkg::*;
#(
  parameter logic [31:0] BOARD_ID_RST   = 32'h0065_0000,
  parameter logic [31:0] RX_TIMEOUT_RST = 32'd4096
) (
  input  logic        clk,
  input  logic        rst_n,
  // command words
  input  logic        cmd_empty,
  input  logic [15:0] cmd_data,
  output logic        cmd_rd,
  // reply words
  input  logic        rep_full,
  output logic        rep_wr,
  output logic [15:0] rep_data,
  // configuration
  output logic        eb_enable,
  output logic [31:0] board_id,
  output logic [31:0] run_number,
  output logic [31:0] rx_timeout,
  // monitoring from the Frame Maker
  input  logic        frame_done,
  input  logic [7:0]  frame_flags,
  input  logic [31:0] frame_time,
  input  logic        vme_drop,
  // VME FIFO read port
  input  logic        vf_empty,
  input  oword_t      vf_data,
  output logic        vf_rd
);
  typedef enum logic [2:0] {V_CMD, V_WHI, V_WLO, V_RHI, V_RLO} vstate_t;

  vstate_t     st;
  logic [7:0]  addr;
  logic [15:0] whi;
  logic [31:0] rdata;
  logic [15:0] rword;
  logic [31:0] frames, err_frames, last_time, max_time, drops;
  logic [7:0]  last_flags;

  always_comb begin
    unique case (addr)
      8'h00:   rdata = {31'b0, eb_enable};
      8'h01:   rdata = board_id;
      8'h02:   rdata = run_number;
      8'h03:   rdata = rx_timeout;
      8'h08:   rdata = frames;
      8'h09:   rdata = err_frames;
      8'h0A:   rdata = {24'b0, last_flags};
      8'h0B:   rdata = last_time;
      8'h0C:   rdata = max_time;
      8'h0D:   rdata = drops;
      8'h10:   rdata = vf_empty ? '0 : vf_data.data;
      8'h11:   rdata = {30'b0, vf_data.last && !vf_empty, vf_empty};
      default: rdata = '0;
    endcase
  end

  assign cmd_rd   = !cmd_empty && (st == V_CMD || st == V_WHI || st == V_WLO);
  assign rep_wr   = !rep_full && (st == V_RHI || st == V_RLO);
  assign rep_data = (st == V_RHI) ? rdata[31:16] : rword;
  // a VME FIFO word is popped when the upper half of its read is sent
  assign vf_rd    = rep_wr && st == V_RHI && addr == 8'h10 && !vf_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= V_CMD;
      addr       <= '0;
      whi        <= '0;
      rword      <= '0;
      eb_enable  <= 1'b1;
      board_id   <= BOARD_ID_RST;
      run_number <= '0;
      rx_timeout <= RX_TIMEOUT_RST;
      frames     <= '0;
      err_frames <= '0;
      last_time  <= '0;
      max_time   <= '0;
      drops      <= '0;
      last_flags <= '0;
    end else begin
      // monitoring
      if (frame_done) begin
        frames     <= frames + 1'b1;
        last_flags <= frame_flags;
        last_time  <= frame_time;
        if (frame_flags != '0) err_frames <= err_frames + 1'b1;
        if (frame_time > max_time) max_time <= frame_time;
      end
      if (vme_drop) drops <= drops + 1'b1;

      // command decoding
      unique case (st)
        V_CMD: if (cmd_rd) begin
          addr <= cmd_data[7:0];
          st   <= cmd_data[15] ? V_RHI : V_WHI;
        end
        V_WHI: if (cmd_rd) begin
          whi <= cmd_data;
          st  <= V_WLO;
        end
        V_WLO: if (cmd_rd) begin
          unique case (addr)
            8'h00: eb_enable  <= cmd_data[0];
            8'h01: board_id   <= {whi, cmd_data};
            8'h02: run_number <= {whi, cmd_data};
            8'h03: rx_timeout <= {whi, cmd_data};
            default: ;
          endcase
          st <= V_CMD;
        end
        V_RHI: if (rep_wr) begin
          rword <= rdata[15:0];
          st    <= V_RLO;
        end
        V_RLO: if (rep_wr) st <= V_CMD;
        default: st <= V_CMD;
      endcase
    end
  end

endmodule
