// tb_rod_board: end-to-end test of the whole board logic at its default
// sizes: the ROD FPGA and the VME FPGA's link end, talking over their
// serial pair. It runs the same scenario as the ROD FPGA test, with every
// configuration and monitoring access made through the VME FPGA's register
// access port (80 MHz clock) instead of a model of the VME FPGA.
//
// Around the board sit behavioural models of the two RX/SL transmitters
// (rxsl_model) and the ROS receiver (ros_model), plus a TTC driver with
// reference EVID/BCID counters. For every Level-1 Accept the testbench sends
// the matching RX/SL frames (or a faulty one on purpose) and predicts the
// ROD frame; every fragment received is compared word by word (the build
// time word only for being non-zero).
// Scenario: configuration; single triggers with good frames, an EVID
// mismatch, a wrong trailer count, a missing frame (timeout) and a stray
// word; an ECR; a burst of large events built while the Frame Maker is
// disabled and then released, which fills the S-Link FIFO (back-pressure)
// and the VME FIFO (dropped copies); readback of the monitoring registers
// and of the VME FIFO; L1As against a full EVID FIFO. Each mechanism is
// counted, and one that never happens is a failure; every register access
// must complete without a reply timeout.
`timescale 1ns/1ps
module tb_rod_board;
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
  logic slink_txd;
  logic vme_clk = 0;
  always #6.25 vme_clk = ~vme_clk;     // 80 MHz VME FPGA clock
  logic        vme_req = 0, vme_we = 0;
  logic [7:0]  vme_addr = 0;
  logic [31:0] vme_wdata = 0;
  logic        vme_ready, vme_ack, vme_err;
  logic [31:0] vme_rdata;
  fm_state_t   mon_state;
  logic        mon_frame_done;
  logic [7:0]  mon_frame_flags;
  logic [31:0] mon_frame_time;
  logic [15:0] mon_lost_l1a, mon_slink_frags;
  logic [7:0][15:0] mon_left_ovf, mon_left_code_err, mon_right_ovf, mon_right_code_err;

  rod_board dut (.*);

  rxsl_model       left_m  (.ser_clk(left_ser_clk),  .rst_n(rst_n), .txd(left_rxd));
  rxsl_model       right_m (.ser_clk(right_ser_clk), .rst_n(rst_n), .txd(right_rxd));
  ros_model        ros     (.ser_clk(slink_ser_clk), .rst_n(rst_n), .rxd(slink_txd));

  localparam logic [31:0] BID = 32'h0065_0042, RUN = 32'h0000_1234;
  localparam int M_GOOD = 0, M_MISMATCH = 1, M_LENERR = 2, M_MISSING = 3, M_STRAY = 4;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask


  // ---------------- register access through the VME FPGA ----------------
  int n_access = 0;
  task automatic vme_access(input bit w, input logic [7:0] a, input logic [31:0] dw, output logic [31:0] q);
    int n;
    wait (vme_ready);
    @(negedge vme_clk);
    vme_req = 1; vme_we = w; vme_addr = a; vme_wdata = dw;
    @(negedge vme_clk);
    vme_req = 0;
    n = 0;
    while (!vme_ack && n < 10000) begin @(posedge vme_clk); #1; n++; end
    check(vme_ack === 1'b1 && vme_err === 1'b0, $sformatf("VME access to %h completes", a));
    if (vme_ack !== 1'b1 || vme_err !== 1'b0) begin   // link broken: nothing else can work
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
    q = vme_rdata;
    n_access++;
  endtask
  task automatic vme_write(input logic [7:0] a, input logic [31:0] dw);
    logic [31:0] q;
    vme_access(1'b1, a, dw, q);
    // writes are posted: reading back waits until the ROD FPGA applied it
    vme_access(1'b0, a, 32'h0, q);
    check(q === dw, $sformatf("register %h reads back %h after writing %h", a, q, dw));
  endtask
  task automatic vme_read(input logic [7:0] a, output logic [31:0] q);
    vme_access(1'b0, a, 32'h0, q);
  endtask

  // ---------------- expected frames ----------------
  logic [31:0] exp_w[$];
  bit          exp_skip[$];     // build time word
  int          exp_n[$];
  int          n_frames = 0, n_err_frames = 0;

  function automatic void add_frame(input trig_t t, input logic [31:0] lf[$], input logic [31:0] rf[$],
                                    input bit lok, input bit rok, input logic [7:0] flags);
    int nd;
    logic [31:0] h[$];
    h = {ROD_SOF, ROD_HDR_SZ, ROD_FMT_VER, BID, RUN, 32'(t.evid), 32'(t.bcid), 32'h0, 32'h0};
    foreach (h[i]) begin exp_w.push_back(h[i]); exp_skip.push_back(0); end
    nd = 0;
    if (lok) foreach (lf[i]) begin exp_w.push_back(lf[i]); exp_skip.push_back(0); nd++; end
    if (rok) foreach (rf[i]) begin exp_w.push_back(rf[i]); exp_skip.push_back(0); nd++; end
    exp_w.push_back({24'h0, flags});           exp_skip.push_back(0);
    exp_w.push_back(32'h0);                    exp_skip.push_back(1);
    exp_w.push_back(32'(nd));                  exp_skip.push_back(0);
    exp_w.push_back(32'(nd + 13));             exp_skip.push_back(0);
    exp_n.push_back(nd + 13);
    n_frames++;
    if (flags != 0) n_err_frames++;
  endfunction

  function automatic void rx_frame(ref logic [31:0] q[$], input trig_t t, input int n, input int cnt);
    q.push_back({RX_HDR_TAG, t.evid[11:0], t.bcid, 4'h0});
    for (int i = 0; i < n; i++) q.push_back({4'h2, 28'($urandom)});
    q.push_back({RX_TRL_TAG, 12'h0, 16'(cnt)});
  endfunction

  // ---------------- TTC driver with reference counters ----------------
  typedef struct { int lmode; int rmode; int nl; int nr; bit ecr; bit no_data; } req_t;
  req_t req_q[$];
  int   ref_bc = 0, ref_ev = 0, orbit = 0;
  int   n_ecr = 0, n_bcr = 0;

  always @(negedge ttc_clk) begin
    ttc_l1a = 0; ttc_ecr = 0; ttc_bcr = 0;
    if (dut.u_rod_fpga.rst_ttc_n) begin
      int bc_now;
      orbit++;
      if (orbit == 3000) begin ttc_bcr = 1; orbit = 0; n_bcr++; end
      if (req_q.size() != 0) begin
        req_t r;
        r = req_q.pop_front();
        if (r.ecr) begin ttc_ecr = 1; n_ecr++; end
        else begin
          trig_t t;
          logic [31:0] lf[$], rf[$];
          logic [7:0]  fl;
          bit lok, rok;
          ttc_l1a = 1;
          lf.delete(); rf.delete();
          bc_now = ttc_bcr ? 0 : ref_bc;
          t.evid = 24'(ref_ev);
          t.bcid = 12'(bc_now);
          if (!r.no_data) begin
            fl = 0; lok = 1; rok = 1;
            // left side
            if (r.lmode == M_MISMATCH) begin
              trig_t w; w = t; w.evid = t.evid + 24'd7; rx_frame(lf, w, r.nl, r.nl);
              lok = 0; fl[ERR_ID] = 1;
            end else if (r.lmode == M_STRAY) begin
              left_m.push(32'h5555_AAAA);
              rx_frame(lf, t, r.nl, r.nl); fl[ERR_HDR] = 1;
            end else rx_frame(lf, t, r.nl, r.nl);
            // right side
            if (r.rmode == M_LENERR) begin rx_frame(rf, t, r.nr, r.nr + 3); fl[4 + ERR_LEN] = 1; end
            else if (r.rmode == M_MISSING) begin rok = 1; fl[4 + ERR_TIMEOUT] = 1; end
            else rx_frame(rf, t, r.nr, r.nr);
            foreach (lf[i]) left_m.push(lf[i]);
            foreach (rf[i]) right_m.push(rf[i]);
            add_frame(t, lf, rf, lok, rok, fl);
          end
        end
      end
      bc_now = ttc_bcr ? 0 : ref_bc;
      ref_bc = (bc_now == 3563) ? 0 : bc_now + 1;
      if (ttc_ecr) ref_ev = 0;
      else if (ttc_l1a) ref_ev++;
    end
  end

  task automatic trigger(input int lmode, input int rmode, input int nl, input int nr);
    req_t r;
    r.lmode = lmode; r.rmode = rmode; r.nl = nl; r.nr = nr; r.ecr = 0; r.no_data = 0;
    req_q.push_back(r);
    wait (req_q.size() == 0);
  endtask

  // ---------------- mechanism counters ----------------
  int n_s1 = 0, n_stall = 0, n_rx_wait = 0, n_disabled = 0, n_drop = 0;
  int n_f_id = 0, n_f_len = 0, n_f_tmo = 0, n_f_hdr = 0, n_done = 0;
  always @(posedge clk) if (rst_n) begin   // counted once out of reset
    if (mon_state == S1_EVID_EMPTY) n_s1++;
    if (dut.u_rod_fpga.sl_full && (mon_state == S3_WRITE_HEADER || mon_state == S_READ_LEFT ||
                        mon_state == S_READ_RIGHT || mon_state == S4_WRITE_FOOTER)) n_stall++;
    if ((mon_state == S_READ_LEFT && dut.u_rod_fpga.l_empty) || (mon_state == S_READ_RIGHT && dut.u_rod_fpga.r_empty)) n_rx_wait++;
    if (!dut.u_rod_fpga.eb_enable) n_disabled++;
    if (dut.u_rod_fpga.vme_drop) n_drop++;
    if (mon_frame_done) begin
      n_done++;
      if (mon_frame_flags[ERR_ID] || mon_frame_flags[4 + ERR_ID]) n_f_id++;
      if (mon_frame_flags[ERR_LEN] || mon_frame_flags[4 + ERR_LEN]) n_f_len++;
      if (mon_frame_flags[ERR_TIMEOUT] || mon_frame_flags[4 + ERR_TIMEOUT]) n_f_tmo++;
      if (mon_frame_flags[ERR_HDR] || mon_frame_flags[4 + ERR_HDR]) n_f_hdr++;
    end
  end

  task automatic wait_frames(input int n, input int max_us);
    for (int i = 0; i < max_us * 10 && ros.sizes.size() < n; i++) #100;
  endtask

  // ---------------- scenario ----------------
  initial begin
    logic [31:0] d;
    int first_words;
    #100 rst_n = 1;
    #3000;                                   // links align on idles

    vme_write(8'h01, BID);
    vme_write(8'h02, RUN);
    vme_write(8'h03, 32'd2000);
    vme_read(8'h01, d); check(d === BID, $sformatf("BOARD_ID readback %h", d));
    vme_read(8'h03, d); check(d === 32'd2000, "RX_TIMEOUT readback");

    // single triggers
    trigger(M_GOOD, M_GOOD, 5, 8);          #3000;
    trigger(M_GOOD, M_GOOD, 0, 30);         #3000;
    trigger(M_MISMATCH, M_GOOD, 6, 4);      #3000;
    trigger(M_GOOD, M_LENERR, 3, 9);        #3000;
    trigger(M_GOOD, M_MISSING, 4, 0);       #15000;
    trigger(M_STRAY, M_GOOD, 7, 7);         #3000;
    for (int i = 0; i < 4; i++) begin
      trigger(M_GOOD, M_GOOD, $urandom_range(0, 40), $urandom_range(0, 40));
      #($urandom_range(500, 4000));
    end
    // event counter reset, then two more
    begin req_t r; r = '{0, 0, 0, 0, 1, 0}; req_q.push_back(r); wait (req_q.size() == 0); end
    #200;
    trigger(M_GOOD, M_GOOD, 2, 2);          #2000;
    trigger(M_GOOD, M_GOOD, 10, 1);
    wait_frames(n_frames, 200);
    check(ros.sizes.size() === n_frames, $sformatf("fragments after singles %0d exp %0d", ros.sizes.size(), n_frames));

    // burst while disabled, then release
    vme_write(8'h00, 32'd0);
    for (int i = 0; i < 6; i++) trigger(M_GOOD, M_GOOD, 150, 150);
    #20000;                                   // RX data lands in the RX FIFOs
    check(ros.sizes.size() === n_frames - 6, "nothing built while disabled");
    vme_write(8'h00, 32'd1);
    wait_frames(n_frames, 400);

    // compare every fragment
    check(ros.sizes.size() === n_frames, $sformatf("fragments %0d exp %0d", ros.sizes.size(), n_frames));
    check(ros.errors === 0, $sformatf("S-Link protocol errors %0d", ros.errors));
    check(mon_slink_frags === 16'(n_frames), "S-Link fragment counter");
    foreach (exp_n[i]) check(i < ros.sizes.size() && ros.sizes[i] === exp_n[i],
                             $sformatf("fragment %0d size %0d exp %0d", i, i < ros.sizes.size() ? ros.sizes[i] : -1, exp_n[i]));
    check(ros.words.size() === exp_w.size(), "total words");
    foreach (exp_w[i]) if (i < ros.words.size()) begin
      if (exp_skip[i]) check(ros.words[i] !== 0, "build time non-zero");
      else check(ros.words[i] === exp_w[i], $sformatf("word %0d = %h exp %h", i, ros.words[i], exp_w[i]));
    end

    // monitoring registers
    vme_read(8'h08, d); check(d === 32'(n_frames), $sformatf("FRAMES %0d exp %0d", d, n_frames));
    vme_read(8'h09, d); check(d === 32'(n_err_frames), $sformatf("ERR_FRAMES %0d exp %0d", d, n_err_frames));
    vme_read(8'h0D, d); check(d === 32'(n_drop) && d > 0, $sformatf("VME_DROPS %0d", d));
    vme_read(8'h0C, d); check(d > 0, "MAX_TIME");
    // the VME FIFO holds a copy of the first words
    first_words = 20;
    for (int i = 0; i < first_words; i++) begin
      vme_read(8'h10, d);
      check(exp_skip[i] || d === exp_w[i], $sformatf("VME FIFO word %0d = %h exp %h", i, d, exp_w[i]));
    end
    check(mon_left_code_err === '0 && mon_right_code_err === '0, "no line code errors");
    check(mon_left_ovf === '0 && mon_right_ovf === '0, "no RX FIFO overflow");

    // L1As against a full EVID FIFO
    vme_write(8'h00, 32'd0);
    for (int i = 0; i < 40; i++) begin
      req_t r; r = '{0, 0, 0, 0, 0, 1}; req_q.push_back(r);
    end
    wait (req_q.size() == 0);
    #200;
    check(mon_lost_l1a === 16'd8, $sformatf("lost L1A %0d", mon_lost_l1a));

    // every mechanism happened
    check(n_s1 > 0,       "waited for an EVID (S1)");
    check(n_rx_wait > 0,  "waited for RX data");
    check(n_stall > 0,    "S-Link FIFO back-pressure");
    check(n_disabled > 0, "builder disabled");
    check(n_drop > 0,     "VME FIFO full, copies dropped");
    check(n_f_id === 1,    $sformatf("EVID mismatch frames %0d", n_f_id));
    check(n_f_len === 1,   "length error frames");
    check(n_f_tmo === 1,   "timeout frames");
    check(n_f_hdr === 1,   "header error frames");
    check(n_ecr === 1 && n_bcr > 0, "ECR and BCR sent");
    $display("mechanisms: S1 %0d, rx wait %0d, stall %0d, disabled %0d, vme drops %0d, id %0d, len %0d, timeout %0d, hdr %0d, ecr %0d, bcr %0d, lost l1a %0d",
             n_s1, n_rx_wait, n_stall, n_disabled, n_drop, n_f_id, n_f_len, n_f_tmo, n_f_hdr, n_ecr, n_bcr, mon_lost_l1a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
