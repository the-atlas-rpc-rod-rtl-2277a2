// tb_vme2eb_tx: plays the ROD-FPGA side of the VME link with queues for the
// command and reply FIFOs. A model register file answers the reads after a
// random delay; the command FIFO reports full at random. Checks: every
// access produces exactly the command words of the protocol, writes land in
// the model, reads return the model's value with ack and without err, one
// access at a time (ready); a read that gets no reply ends with err after
// REPLY_TMO clocks, and its late reply is flushed before the next read.
`timescale 1ns/1ps
module tb_vme2eb_tx;
  localparam int TMO = 200;

  logic        clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        req = 0, we = 0;
  logic [7:0]  addr = 0;
  logic [31:0] wdata = 0;
  logic        ready, ack, err;
  logic [31:0] rdata;
  logic        cmd_full, cmd_wr, rep_empty, rep_rd;
  logic [15:0] cmd_data, rep_data;

  vme2eb_tx #(.REPLY_TMO(TMO)) dut (.*);

  int checks = 0, failures = 0, n_full = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- ROD side model ----------------
  logic [15:0] cq[$], rq[$];
  logic [31:0] regs[256];
  bit          mute = 0;           // do not answer reads
  int          delay = 0;
  logic        pr;
  assign rep_empty = rq.size() == 0;
  assign rep_data  = rep_empty ? 16'h0 : rq[0];

  always @(posedge clk) begin
    pr <= rep_rd;
    if (cmd_wr) cq.push_back(cmd_data);
    cmd_full <= ($urandom_range(3) == 0);
    if (cmd_full) n_full++;
  end
  always @(negedge clk) begin
    if (pr) void'(rq.pop_front());
    pr = 0;
  end

  // decode command words as the ROD FPGA would
  initial begin
    logic [15:0] c, hi, lo;
    regs = '{default: 32'h0};
    forever begin
      wait (cq.size() != 0);
      c = cq.pop_front();
      check(c[14:8] === 7'h0, "command word format");
      if (!c[15]) begin
        wait (cq.size() >= 2);
        hi = cq.pop_front(); lo = cq.pop_front();
        regs[c[7:0]] = {hi, lo};
      end else if (!mute) begin
        repeat ($urandom_range(0, 30)) @(posedge clk);
        @(negedge clk);
        rq.push_back(regs[c[7:0]][31:16]);
        rq.push_back(regs[c[7:0]][15:0]);
      end
      @(posedge clk);
    end
  end

  task automatic access(input bit w, input logic [7:0] a, input logic [31:0] d, output logic [31:0] q,
                        output bit e);
    int n;
    wait (ready);
    @(negedge clk);
    req = 1; we = w; addr = a; wdata = d;
    @(negedge clk);
    req = 0;
    n = 0;
    while (!ack && n < 4 * TMO) begin @(posedge clk); #1; n++; end
    check(ack === 1'b1, "access completes");
    q = rdata; e = err;
  endtask

  initial begin
    logic [31:0] q, m[256];
    bit e;
    m = '{default: 32'h0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    check(ready === 1'b1, "ready after reset");
    for (int i = 0; i < 120; i++) begin
      logic [7:0] a;
      a = 8'($urandom_range(0, 15));
      if ($urandom_range(1)) begin
        logic [31:0] d;
        d = $urandom;
        access(1, a, d, q, e);
        m[a] = d;
        check(!e, "write without err");
        wait (cq.size() == 0);
        repeat (2) @(posedge clk);
        check(regs[a] === d, $sformatf("write reg %0d = %h exp %h", a, regs[a], d));
      end else begin
        access(0, a, 32'h0, q, e);
        check(!e && q === m[a], $sformatf("read reg %0d = %h exp %h", a, q, m[a]));
      end
    end
    // a read without answer times out
    mute = 1;
    access(0, 8'h03, 32'h0, q, e);
    check(e === 1'b1 && q === 32'h0, "read timeout sets err");
    // a late reply sits in the FIFO; the next read must skip it
    @(negedge clk);
    rq.push_back(16'hBAD0); rq.push_back(16'h0BAD);
    mute = 0;
    access(0, 8'h05, 32'h0, q, e);
    check(!e && q === m[5], $sformatf("stale reply flushed, read %h exp %h", q, m[5]));
    check(n_full > 0, "command FIFO back-pressure seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
