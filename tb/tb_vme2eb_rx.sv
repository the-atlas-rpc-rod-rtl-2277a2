// tb_vme2eb_rx: plays the VME FPGA side of the link with queues for the
// command and reply words. Writes and reads back the configuration
// registers and checks the configuration outputs and reset values; pulses
// frame_done / vme_drop and reads the monitoring counters; reads the VME
// FIFO through VME_DATA and VME_STAT; applies random back-pressure on the
// reply side.
`timescale 1ns/1ps
module tb_vme2eb_rx;
  import rod_pkg::*;
  logic clk = 0, rst_n = 0;
  always #2 clk = ~clk;

  logic        cmd_empty, cmd_rd, rep_full, rep_wr, eb_enable;
  logic [15:0] cmd_data, rep_data;
  logic [31:0] board_id, run_number, rx_timeout, frame_time;
  logic        frame_done, vme_drop, vf_empty, vf_rd;
  logic [7:0]  frame_flags;
  oword_t      vf_data;

  vme2eb_rx #(.BOARD_ID_RST(32'h0065_0001), .RX_TIMEOUT_RST(32'd99)) dut (.*);

  logic [15:0] cq[$], rq[$];
  oword_t      vq[$];
  assign cmd_empty = cq.size() == 0;
  assign cmd_data  = cmd_empty ? '0 : cq[0];
  assign vf_empty  = vq.size() == 0;
  assign vf_data   = vf_empty ? '0 : vq[0];

  int checks = 0, failures = 0, n_bp = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic pc, pv;
  always @(posedge clk) begin
    pc <= cmd_rd; pv <= vf_rd;
    if (rep_wr) rq.push_back(rep_data);
    rep_full <= ($urandom_range(3) == 0);
    if (rep_full) n_bp++;
  end
  always @(negedge clk) begin
    if (pc) void'(cq.pop_front());
    if (pv) void'(vq.pop_front());
    pc = 0; pv = 0;
  end

  task automatic vwrite(input logic [7:0] a, input logic [31:0] d);
    cq.push_back({8'h00, a}); cq.push_back(d[31:16]); cq.push_back(d[15:0]);
    wait (cq.size() == 0);
    repeat (2) @(posedge clk);
  endtask

  task automatic vread(input logic [7:0] a, output logic [31:0] d);
    rq.delete();
    cq.push_back({8'h80, a});
    for (int i = 0; i < 1000 && rq.size() < 2; i++) @(posedge clk);
    d = (rq.size() == 2) ? {rq[0], rq[1]} : 32'hDEAD_DEAD;
    @(posedge clk);
  endtask

  initial begin
    logic [31:0] d;
    frame_done = 0; vme_drop = 0; frame_flags = 0; frame_time = 0; rep_full = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    // reset values
    vread(8'h00, d); check(d === 32'd1 && eb_enable, "CTRL reset");
    vread(8'h01, d); check(d === 32'h0065_0001, $sformatf("BOARD_ID reset %h", d));
    vread(8'h03, d); check(d === 32'd99, "RX_TIMEOUT reset");
    // writes
    vwrite(8'h01, 32'hCAFE_0042); check(board_id === 32'hCAFE_0042, "board_id out");
    vwrite(8'h02, 32'd777);       check(run_number === 32'd777, "run_number out");
    vwrite(8'h03, 32'd12345);     check(rx_timeout === 32'd12345, "rx_timeout out");
    vwrite(8'h00, 32'd0);         check(!eb_enable, "enable cleared");
    vread(8'h01, d); check(d === 32'hCAFE_0042, "BOARD_ID read back");
    vread(8'h02, d); check(d === 32'd777, "RUN_NUMBER read back");
    vread(8'h55, d); check(d === 32'd0, "unmapped reads 0");
    vwrite(8'h00, 32'd1);         check(eb_enable, "enable set");
    // monitoring
    for (int i = 0; i < 5; i++) begin
      @(negedge clk);
      frame_done = 1; frame_flags = (i == 2) ? 8'h12 : 8'h00; frame_time = 32'(100 + i * 7 - (i == 3 ? 50 : 0));
      vme_drop = (i < 3);
      @(negedge clk);
      frame_done = 0; vme_drop = 0;
    end
    vread(8'h08, d); check(d === 32'd5, "FRAMES");
    vread(8'h09, d); check(d === 32'd1, "ERR_FRAMES");
    vread(8'h0A, d); check(d === 32'h0, "LAST_FLAGS");
    vread(8'h0B, d); check(d === 32'd128, $sformatf("LAST_TIME %0d", d));
    vread(8'h0C, d); check(d === 32'd128, $sformatf("MAX_TIME %0d", d));
    vread(8'h0D, d); check(d === 32'd3, "VME_DROPS");
    // VME FIFO
    vread(8'h11, d); check(d === 32'd1, "VME_STAT empty");
    vq.push_back('{last: 1'b0, data: 32'h1111_2222});
    vq.push_back('{last: 1'b1, data: 32'h3333_4444});
    vread(8'h11, d); check(d === 32'd0, "VME_STAT not empty");
    vread(8'h10, d); check(d === 32'h1111_2222, "VME_DATA 1");
    vread(8'h11, d); check(d === 32'd2, "VME_STAT last");
    vread(8'h10, d); check(d === 32'h3333_4444, "VME_DATA 2");
    vread(8'h10, d); check(d === 32'h0 && vq.size() === 0, "VME_DATA empty");
    // random register traffic against a model of the four RW registers
    begin
      logic [31:0] m[4];
      logic [7:0]  a;
      m[0] = 32'd1; m[1] = 32'hCAFE_0042; m[2] = 32'd777; m[3] = 32'd12345;
      for (int i = 0; i < 60; i++) begin
        a = 8'($urandom_range(3));
        if ($urandom_range(1)) begin
          d = $urandom;
          if (a == 0) d[0] = 1'b1;           // keep the builder enabled
          vwrite(a, d);
          m[a] = (a == 0) ? {31'h0, d[0]} : d;
        end else begin
          vread(a, d);
          check(d === m[a], $sformatf("random read reg %0d = %h exp %h", a, d, m[a]));
        end
        check(eb_enable === m[0][0] && board_id === m[1] && run_number === m[2] && rx_timeout === m[3],
              "configuration outputs follow the registers");
      end
    end
    // read-only registers ignore writes
    vwrite(8'h08, 32'hFFFF_FFFF);
    vread(8'h08, d); check(d === 32'd5, "FRAMES is read only");
    // random monitoring events against model counters
    begin
      int nf, ne, nd;
      logic [31:0] last_t, max_t;
      logic [7:0]  last_f;
      nf = 5; ne = 1; nd = 3; max_t = 128; last_t = 128; last_f = 0;
      for (int i = 0; i < 40; i++) begin
        @(negedge clk);
        frame_done = ($urandom_range(2) != 0);
        vme_drop   = ($urandom_range(3) == 0);
        frame_flags = ($urandom_range(4) == 0) ? 8'(1 << $urandom_range(7)) : 8'h00;
        frame_time  = 32'($urandom_range(20, 400));
        if (frame_done) begin
          nf++; if (frame_flags != 0) ne++;
          last_t = frame_time; last_f = frame_flags;
          if (frame_time > max_t) max_t = frame_time;
        end
        if (vme_drop) nd++;
        @(negedge clk);
        frame_done = 0; vme_drop = 0;
      end
      vread(8'h08, d); check(d === 32'(nf), $sformatf("FRAMES %0d exp %0d", d, nf));
      vread(8'h09, d); check(d === 32'(ne), "ERR_FRAMES after random events");
      vread(8'h0A, d); check(d === 32'(last_f), "LAST_FLAGS after random events");
      vread(8'h0B, d); check(d === last_t, "LAST_TIME after random events");
      vread(8'h0C, d); check(d === max_t, "MAX_TIME after random events");
      vread(8'h0D, d); check(d === 32'(nd), "VME_DROPS after random events");
    end
    // drain a longer VME FIFO through the register
    begin
      oword_t ex[$];
      for (int i = 0; i < 50; i++) begin
        oword_t w;
        w.data = $urandom; w.last = (i % 7 == 6);
        vq.push_back(w); ex.push_back(w);
      end
      foreach (ex[i]) begin
        vread(8'h11, d); check(d === {30'h0, ex[i].last, 1'b0}, $sformatf("VME_STAT word %0d", i));
        vread(8'h10, d); check(d === ex[i].data, $sformatf("VME_DATA word %0d", i));
      end
      vread(8'h11, d); check(d === 32'd1, "VME FIFO drained");
    end
    check(n_bp > 0, "reply back-pressure seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
