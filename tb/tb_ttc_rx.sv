// tb_ttc_rx: drives random L1A, BCR and ECR pulses into the TTC interface
// and compares every {EVID, BCID} written to the EVID FIFO with a reference
// count kept by the testbench; also checks the orbit wrap of the BCID and
// that an L1A meeting a full FIFO is counted as lost and not written.
`timescale 1ns/1ps
module tb_ttc_rx;
  import rod_pkg::*;
  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;

  logic l1a, bcr, ecr, evid_wr, evid_full;
  trig_t evid_wdata;
  logic [15:0] lost_l1a;
  logic [EVID_W-1:0] evid_cnt;
  logic [BCID_W-1:0] bcid_cnt;

  ttc_rx #(.BC_PER_ORBIT(100)) dut (.*);

  int checks = 0, failures = 0;
  int ref_bc, ref_ev, n_wr = 0, n_lost = 0, n_wrap = 0, n_ecr = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    int bc_now;
    bc_now = bcr ? 0 : ref_bc;
    check(evid_wr === (l1a && !evid_full), "write strobe");
    if (l1a && !evid_full) begin
      n_wr++;
      check(evid_wdata.bcid === 12'(bc_now) && evid_wdata.evid === 24'(ecr ? 0 : ref_ev),
            $sformatf("trigger %0d/%0d exp %0d/%0d", evid_wdata.evid, evid_wdata.bcid, ref_ev, bc_now));
    end
    if (l1a && evid_full) n_lost++;
    if (!bcr && ref_bc == 99) n_wrap++;
    ref_bc = (bc_now == 99) ? 0 : bc_now + 1;
    if (ecr) begin ref_ev = l1a ? 1 : 0; n_ecr++; end
    else if (l1a) ref_ev++;
  end

  initial begin
    l1a = 0; bcr = 0; ecr = 0; evid_full = 0;
    ref_bc = 0; ref_ev = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      l1a       = ($urandom_range(9) == 0);
      bcr       = (i > 1000) && ($urandom_range(79) == 0);
      ecr       = ($urandom_range(299) == 0);
      evid_full = (i > 2000) && ($urandom_range(3) == 0);
    end
    @(negedge clk); l1a = 0; bcr = 0; ecr = 0;
    @(posedge clk); #1;
    check(lost_l1a === 16'(n_lost) && n_lost > 0, $sformatf("lost %0d exp %0d", lost_l1a, n_lost));
    check(n_wr > 100 && n_wrap > 0 && n_ecr > 0, "all cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
