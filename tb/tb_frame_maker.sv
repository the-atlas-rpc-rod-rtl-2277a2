// tb_frame_maker: self-checking testbench of the Frame Maker.
//
// The EVID FIFO, the two RX FIFOs and the S-Link FIFO are modelled with
// queues (first-word-fall-through). Each test pushes one trigger and the RX
// frames of both sides, predicts the ROD frame word by word from the frame
// format (9 header words, accepted RX frames, 4 footer words) and compares
// it with what the Frame Maker writes. Covered: good frames, EVID mismatch
// (frame dropped), wrong trailer count, a missing side (timeout), a stray
// word before the header, waiting on an empty EVID FIFO, the builder
// disabled, and random back-pressure from the S-Link FIFO. Without
// back-pressure the build time and the frame latency are checked against
// one word per clock.
`timescale 1ns/1ps
module tb_frame_maker;
  import rod_pkg::*;

  logic clk = 0, rst_n = 0;
  always #2 clk = ~clk;

  logic        enable;
  logic [31:0] board_id = 32'h0065_0012, run_number = 32'd1234;
  logic [31:0] rx_timeout;
  logic        evid_empty, evid_rd, l_empty, l_rd, r_empty, r_rd;
  trig_t       evid_rdata;
  logic [31:0] l_data, r_data;
  logic        out_full, out_wr;
  oword_t      out_data;
  fm_state_t   state;
  logic        frame_done;
  logic [7:0]  frame_flags;
  logic [31:0] frame_time;

  frame_maker dut (.*);

  trig_t       evq[$];
  logic [31:0] lq[$], rq[$], got[$];
  logic        got_last[$];

  assign evid_empty = evq.size() == 0;
  assign evid_rdata = evid_empty ? '0 : evq[0];
  assign l_empty    = lq.size() == 0;
  assign l_data     = l_empty ? '0 : lq[0];
  assign r_empty    = rq.size() == 0;
  assign r_data     = r_empty ? '0 : rq[0];

  int  stall_pct = 0;
  int  checks = 0, failures = 0;
  int  n_s1 = 0, n_stall = 0;

  // pops are applied at the falling edge, after the DUT has sampled
  logic pe, pl, pr;
  always @(posedge clk) begin
    pe <= evid_rd; pl <= l_rd; pr <= r_rd;
    if (out_wr) begin
      got.push_back(out_data.data);
      got_last.push_back(out_data.last);
    end
    if (state == S1_EVID_EMPTY) n_s1++;
    if (out_full) n_stall++;
    out_full <= ($urandom_range(99) < stall_pct);
  end

  always @(negedge clk) begin
    if (pe) void'(evq.pop_front());
    if (pl) void'(lq.pop_front());
    if (pr) void'(rq.pop_front());
    pe = 0; pl = 0; pr = 0;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // an RX/SL frame: header, n payload words, trailer with count cnt
  function automatic void rx_frame(ref logic [31:0] q[$], input trig_t t, input int n, input int cnt);
    q.push_back({RX_HDR_TAG, t.evid[11:0], t.bcid, 4'h0});
    for (int i = 0; i < n; i++) q.push_back({4'h1, 28'($urandom)});
    q.push_back({RX_TRL_TAG, 12'h0, 16'(cnt)});
  endfunction

  // run one frame: returns after frame_done, checks the frame
  task automatic one_frame(input trig_t t, input logic [31:0] lf[$], input logic [31:0] rf[$],
                           input bit lok, input bit rok, input logic [7:0] flags,
                           input bit check_time);
    logic [31:0] exp[$];
    int nd, t0, t1;
    exp = {ROD_SOF, ROD_HDR_SZ, ROD_FMT_VER, board_id, run_number, 32'(t.evid), 32'(t.bcid), 32'h0, 32'h0};
    nd = 0;
    if (lok) foreach (lf[i]) begin exp.push_back(lf[i]); nd++; end
    if (rok) foreach (rf[i]) begin exp.push_back(rf[i]); nd++; end
    got.delete(); got_last.delete();
    foreach (lf[i]) lq.push_back(lf[i]);
    foreach (rf[i]) rq.push_back(rf[i]);
    evq.push_back(t);
    t0 = -1;
    for (int c = 0; c < 200000 && !frame_done; c++) begin
      @(posedge clk);
      if (t0 < 0 && evid_rd) t0 = c;
      t1 = c;
    end
    @(posedge clk);
    check(got.size() === exp.size() + FTR_WORDS, $sformatf("frame length %0d exp %0d", got.size(), exp.size() + FTR_WORDS));
    if (got.size() == exp.size() + FTR_WORDS) begin
      foreach (exp[i]) check(got[i] === exp[i], $sformatf("word %0d = %h exp %h", i, got[i], exp[i]));
      check(got[exp.size()] === {24'h0, flags}, $sformatf("flags %h exp %h", got[exp.size()], flags));
      check(got[exp.size()+1] === frame_time && frame_time > 0, "build time word");
      check(got[exp.size()+2] === 32'(nd), "data word count");
      check(got[exp.size()+3] === 32'(nd + HDR_WORDS + FTR_WORDS), "total word count");
      foreach (got_last[i]) check(got_last[i] === (i === got.size() - 1), "last flag");
    end
    check(frame_flags === flags, $sformatf("frame_flags %h exp %h", frame_flags, flags));
    if (check_time) begin
      // one word per clock: 9 header words, every RX word, from S2 on
      check(frame_time === 32'(HDR_WORDS + lf.size() + rf.size()),
            $sformatf("build time %0d exp %0d", frame_time, HDR_WORDS + lf.size() + rf.size()));
      // S2 + header + RX words + footer, frame_done one cycle later
      check(t1 - t0 === 1 + HDR_WORDS + lf.size() + rf.size() + FTR_WORDS,
            $sformatf("latency %0d", t1 - t0));
    end
  endtask

  initial begin
    logic [31:0] lf[$], rf[$];
    trig_t t;
    out_full = 0; enable = 1; rx_timeout = 32'd200;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk);

    // 1: good frames, no back-pressure, timing checked
    for (int k = 0; k < 4; k++) begin
      t.evid = 24'(k + 5); t.bcid = 12'($urandom);
      lf.delete(); rf.delete();
      rx_frame(lf, t, $urandom_range(0, 20), -1); lf[$] = {RX_TRL_TAG, 12'h0, 16'(lf.size() - 2)};
      rx_frame(rf, t, $urandom_range(0, 20), -1); rf[$] = {RX_TRL_TAG, 12'h0, 16'(rf.size() - 2)};
      one_frame(t, lf, rf, 1, 1, 8'h00, 1);
    end
    check(n_s1 > 0, "waited in S1 for an EVID");

    // 2: left EVID mismatch -> dropped
    t.evid = 24'd77; t.bcid = 12'd300;
    lf.delete(); rf.delete();
    begin trig_t w; w = t; w.evid = 24'd76; rx_frame(lf, w, 5, 5); end
    rx_frame(rf, t, 3, 3);
    one_frame(t, lf, rf, 0, 1, 8'h02, 0);

    // 3: right trailer count wrong -> appended with length error
    t.evid = 24'd78;
    lf.delete(); rf.delete();
    rx_frame(lf, t, 4, 4);
    rx_frame(rf, t, 6, 7);
    one_frame(t, lf, rf, 1, 1, 8'h40, 0);

    // 4: right side silent -> timeout
    t.evid = 24'd79;
    lf.delete(); rf.delete();
    rx_frame(lf, t, 2, 2);
    one_frame(t, lf, rf, 1, 1, 8'h80, 0);

    // 5: stray word before the left header
    t.evid = 24'd80;
    lf.delete(); rf.delete();
    lf.push_back(32'h1234_5678);
    rx_frame(lf, t, 3, 3);
    rx_frame(rf, t, 1, 1);
    begin
      logic [31:0] lgood[$];
      lgood = lf[1:$];
      // the stray word is not copied: predict with the clean frame
      lq.push_back(lf[0]);
      one_frame(t, lgood, rf, 1, 1, 8'h01, 0);
    end

    // 6: random back-pressure from the S-Link FIFO
    stall_pct = 60;
    for (int k = 0; k < 4; k++) begin
      t.evid = 24'(100 + k); t.bcid = 12'($urandom);
      lf.delete(); rf.delete();
      rx_frame(lf, t, 10, 10);
      rx_frame(rf, t, 12, 12);
      one_frame(t, lf, rf, 1, 1, 8'h00, 0);
    end
    stall_pct = 0;
    check(n_stall > 0, "back-pressure seen");

    // 7: builder disabled -> nothing happens until enabled
    enable = 0;
    @(posedge clk);
    t.evid = 24'd200; t.bcid = 12'd1;
    evq.push_back(t);
    repeat (50) @(posedge clk);
    check(evq.size() === 1 && (state === S0_PREPARE || state === S1_EVID_EMPTY), "disabled builder waits");
    void'(evq.pop_front());
    enable = 1;
    lf.delete(); rf.delete();
    rx_frame(lf, t, 1, 1);
    rx_frame(rf, t, 1, 1);
    one_frame(t, lf, rf, 1, 1, 8'h00, 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
