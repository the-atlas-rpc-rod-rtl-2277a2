// tb_rod_workload: runs the ROD FPGA, at its default sizes, under the input
// load of the ATLAS RPC readout: Level-1 Accepts at 75 kHz (one every 533
// LHC clocks, 13.3 us) with RX/SL frames sized for the average (~200
// Mbit/s, 83 words per side per event) and the maximum (~560 Mbit/s, 233
// words per side per event) bandwidth of one RODbus channel.
//
// The same behavioural models as the end-to-end test surround the design:
// two 8-lane RX/SL transmitters, the S-Link receiver of the ROS and the VME
// master. For each phase the testbench checks every fragment word by word,
// and that the engine keeps up with the trigger rate:
//   - each frame is finished (EVID read to last footer word) within one
//     trigger period (3200 event builder clocks at 240 MHz);
//   - the fragment is on the S-Link, fully received, before the next L1A;
//   - no L1A is lost, no RX FIFO overflows, the S-Link FIFO never fills;
//   - writing header and footer takes less than 3% of the time, as measured
//     on the running system, and the engine is idle most of the time.
// Busy fractions are printed for both phases.
`timescale 1ns/1ps
module tb_rod_workload;
  import rod_pkg::*;

  logic clk = 0, rst_n = 0, ttc_clk = 0;
  logic left_ser_clk = 0, right_ser_clk = 0, slink_ser_clk = 0, vme_ser_clk = 0;
  always #2.083 clk = ~clk;            // 240 MHz event builder
  always #12.5  ttc_clk = ~ttc_clk;    // 40 MHz LHC clock
  always #0.167 left_ser_clk  = ~left_ser_clk;   // ~3 Gbit/s links
  always #0.166 right_ser_clk = ~right_ser_clk;
  always #0.168 slink_ser_clk = ~slink_ser_clk;
  always #2.5   vme_ser_clk   = ~vme_ser_clk;    // 200 Mbit/s

  logic ttc_l1a = 0, ttc_bcr = 0, ttc_ecr = 0;
  logic [7:0] left_rxd, right_rxd;
  logic slink_txd, vme_rxd, vme_txd;
  fm_state_t   mon_state;
  logic        mon_frame_done;
  logic [7:0]  mon_frame_flags;
  logic [31:0] mon_frame_time;
  logic [15:0] mon_lost_l1a, mon_slink_frags;
  logic [7:0][15:0] mon_left_ovf, mon_left_code_err, mon_right_ovf, mon_right_code_err;

  rod_fpga_top dut (.*);

  rxsl_model       left_m  (.ser_clk(left_ser_clk),  .rst_n(rst_n), .txd(left_rxd));
  rxsl_model       right_m (.ser_clk(right_ser_clk), .rst_n(rst_n), .txd(right_rxd));
  ros_model        ros     (.ser_clk(slink_ser_clk), .rst_n(rst_n), .rxd(slink_txd));
  vme_master_model vme     (.ser_clk(vme_ser_clk),   .rst_n(rst_n), .txd(vme_rxd), .rxd(vme_txd));

  localparam logic [31:0] BID = 32'h0065_0017, RUN = 32'h0000_0BEE;
  localparam int L1A_PERIOD = 533;          // LHC clocks between L1As at 75 kHz
  localparam int EB_PERIOD  = 3200;         // event builder clocks in 13.33 us

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- expected fragments ----------------
  logic [31:0] exp_w[$];
  bit          exp_skip[$];
  int          exp_n[$];

  task automatic add_frame(input trig_t t, input logic [31:0] lf[$], input logic [31:0] rf[$]);
    logic [31:0] h[$];
    int nd;
    h = {ROD_SOF, ROD_HDR_SZ, ROD_FMT_VER, BID, RUN, 32'(t.evid), 32'(t.bcid), 32'h0, 32'h0};
    foreach (h[i]) begin exp_w.push_back(h[i]); exp_skip.push_back(0); end
    nd = lf.size() + rf.size();
    foreach (lf[i]) begin exp_w.push_back(lf[i]); exp_skip.push_back(0); end
    foreach (rf[i]) begin exp_w.push_back(rf[i]); exp_skip.push_back(0); end
    exp_w.push_back(32'h0);       exp_skip.push_back(0);
    exp_w.push_back(32'h0);       exp_skip.push_back(1);
    exp_w.push_back(32'(nd));     exp_skip.push_back(0);
    exp_w.push_back(32'(nd + 13)); exp_skip.push_back(0);
    exp_n.push_back(nd + 13);
  endtask

  function automatic void rx_frame(ref logic [31:0] q[$], input trig_t t, input int n);
    q.push_back({RX_HDR_TAG, t.evid[11:0], t.bcid, 4'h0});
    for (int i = 0; i < n; i++) q.push_back({4'h3, 28'($urandom)});
    q.push_back({RX_TRL_TAG, 12'h0, 16'(n)});
  endfunction

  // ---------------- TTC: L1A every L1A_PERIOD clocks ----------------
  int ref_bc = 0, ref_ev = 0;
  int n_to_send = 0, payload = 0, since = 0;
  int n_sent = 0;
  always @(negedge ttc_clk) begin
    ttc_l1a = 0;
    if (dut.rst_ttc_n) begin
      since++;
      if (n_to_send > 0 && since >= L1A_PERIOD) begin
        trig_t t;
        logic [31:0] lf[$], rf[$];
        since = 0;
        lf.delete(); rf.delete();
        n_to_send--;
        ttc_l1a = 1;
        t.evid = 24'(ref_ev);
        t.bcid = 12'(ref_bc);
        rx_frame(lf, t, payload);
        rx_frame(rf, t, payload);
        foreach (lf[i]) left_m.push(lf[i]);
        foreach (rf[i]) right_m.push(rf[i]);
        add_frame(t, lf, rf);
        n_sent++;
        // the previous fragment must be out before this trigger
        check(ros.sizes.size() >= n_sent - 1,
              $sformatf("fragment %0d not received before the next L1A", n_sent - 2));
      end
      ref_bc = (ref_bc == 3563) ? 0 : ref_bc + 1;
      if (ttc_l1a) ref_ev++;
    end
  end

  // ---------------- engine activity ----------------
  longint cyc = 0, c_hdr_ftr = 0, c_read = 0, c_busy = 0;
  int     max_build = 0, n_stall = 0, t_s2 = 0;
  bit     measuring = 0;
  always @(posedge clk) if (rst_n) begin   // counted once out of reset
    if (measuring) begin
      cyc++;
      if (mon_state == S3_WRITE_HEADER || mon_state == S4_WRITE_FOOTER) c_hdr_ftr++;
      if (mon_state == S_READ_LEFT || mon_state == S_READ_RIGHT) c_read++;
      if (mon_state != S0_PREPARE && mon_state != S1_EVID_EMPTY) c_busy++;
    end
    if (dut.sl_full) n_stall++;
    if (mon_state == S2_READ_EVID) t_s2 = 0; else t_s2++;
    if (mon_frame_done && t_s2 > max_build) max_build = t_s2;
  end

  task automatic run_phase(input string name, input int n_events, input int pay);
    int start_frags;
    real f_hf, f_core, f_busy;
    cyc = 0; c_hdr_ftr = 0; c_read = 0; c_busy = 0; max_build = 0;
    start_frags = ros.sizes.size();
    payload = pay;
    measuring = 1;
    n_to_send = n_events;
    wait (n_to_send == 0);
    repeat (L1A_PERIOD) @(posedge ttc_clk);     // one more trigger period
    measuring = 0;
    check(ros.sizes.size() === start_frags + n_events,
          $sformatf("%s: fragments %0d exp %0d", name, ros.sizes.size() - start_frags, n_events));
    f_hf   = 100.0 * real'(c_hdr_ftr) / real'(cyc);
    f_core = 100.0 * real'(c_read) / real'(cyc);
    f_busy = 100.0 * real'(c_busy) / real'(cyc);
    $display("%s: %0d events of %0d words per side at 75 kHz: header+footer %.2f%%, RX reading %.2f%%, busy %.2f%%, longest build %0d clocks",
             name, n_events, pay + 2, f_hf, f_core, f_busy, max_build);
    check(f_hf < 3.0, $sformatf("%s: header and footer take %.2f%% of the time", name, f_hf));
    check(f_busy < 50.0, $sformatf("%s: engine busy %.2f%%", name, f_busy));
    check(max_build > 0 && max_build < EB_PERIOD,
          $sformatf("%s: longest build %0d clocks, trigger period %0d", name, max_build, EB_PERIOD));
  endtask

  initial begin
    logic [31:0] d;
    #100 rst_n = 1;
    #3000;
    vme.write(8'h01, BID);
    vme.write(8'h02, RUN);
    vme.read(8'h02, d); check(d === RUN, "RUN_NUMBER readback");

    run_phase("average ~200 Mbit/s per channel", 4, 81);
    run_phase("maximum ~560 Mbit/s per channel", 6, 231);

    check(ros.sizes.size() === exp_n.size(), "fragment count");
    check(ros.errors === 0, $sformatf("S-Link protocol errors %0d", ros.errors));
    foreach (exp_n[i]) check(i < ros.sizes.size() && ros.sizes[i] === exp_n[i],
                             $sformatf("fragment %0d size", i));
    check(ros.words.size() === exp_w.size(), "total words");
    foreach (exp_w[i]) if (i < ros.words.size()) begin
      if (exp_skip[i]) check(ros.words[i] !== 0, "build time non-zero");
      else check(ros.words[i] === exp_w[i], $sformatf("word %0d = %h exp %h", i, ros.words[i], exp_w[i]));
    end
    check(mon_lost_l1a === 16'd0, "no L1A lost");
    check(n_stall === 0, $sformatf("S-Link FIFO full for %0d clocks", n_stall));
    check(mon_left_ovf === '0 && mon_right_ovf === '0, "no RX FIFO overflow");
    check(mon_left_code_err === '0 && mon_right_code_err === '0, "no line code errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    #400us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
