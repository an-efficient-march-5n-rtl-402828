// tb_march_ctrl: self-checking test of the March controller, with the
// address generator it drives. For March 5n and MATS++ it records every
// issued operation (address, read/write, background, element, operation
// index) and compares it with the algorithm written out here; it checks the
// test length (k*N + 2 cycles from start to done), busy/done behaviour, and
// that a second start after done runs again.
module tb_march_ctrl;
  import mbist_pkg::*;
  localparam int AW = 4;
  localparam int N  = 2**AW;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              start = 0;
  alg_e              alg_sel = ALG_MARCH5N;
  logic              ag_load, ag_step, ag_down, ag_last;
  logic              op_valid, op_we;
  pattern_e          op_pat;
  logic [ELEM_W-1:0] op_elem;
  logic [OP_W-1:0]   op_idx;
  logic              busy, done;
  logic [AW-1:0]     addr;
  logic              dir_down;

  mbist_march_ctrl dut (.*);
  mbist_addr_gen #(.AW(AW)) u_ag (.clk, .rst_n, .load(ag_load), .step(ag_step),
                                  .down(ag_down), .addr, .dir_down, .last(ag_last));

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string w);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask

  // expected operations: {we, pat, elem, opidx, addr}
  typedef struct { bit we; int pat; int elem; int op; int addr; } eop_t;
  eop_t exp_q [$];

  task automatic build(input alg_e alg);
    // each element: direction, then list of (we,pat)
    int nops [3];
    bit dn [3];
    int we_t [3][3];
    int pat_t [3][3];
    exp_q.delete();
    if (alg == ALG_MARCH5N) begin
      dn = '{0, 0, 1}; nops = '{1, 2, 2};
      we_t  = '{'{1, 0, 0}, '{0, 1, 0}, '{0, 1, 0}};
      pat_t = '{'{2, 0, 0}, '{2, 3, 0}, '{3, 2, 0}};
    end else begin
      dn = '{0, 0, 1}; nops = '{1, 2, 3};
      we_t  = '{'{1, 0, 0}, '{0, 1, 0}, '{0, 1, 0}};
      pat_t = '{'{0, 0, 0}, '{0, 1, 0}, '{1, 0, 0}};
    end
    for (int e = 0; e < 3; e++)
      for (int k = 0; k < N; k++)
        for (int o = 0; o < nops[e]; o++)
          exp_q.push_back('{we_t[e][o] != 0, pat_t[e][o], e, o, dn[e] ? N - 1 - k : k});
  endtask

  task automatic run(input alg_e alg, input int k);
    int cyc = 0, idx = 0, bad = 0;
    build(alg);
    @(negedge clk); start = 1; alg_sel = alg;
    @(negedge clk); start = 0; alg_sel = alg_e'(~alg);  // latched at start
    cyc = 1;
    check(busy && !done, "busy after start");
    while (!done) begin
      if (op_valid) begin
        if (idx >= exp_q.size() || op_we != exp_q[idx].we || int'(op_pat) != exp_q[idx].pat ||
            int'(op_elem) != exp_q[idx].elem || int'(op_idx) != exp_q[idx].op ||
            int'(addr) != exp_q[idx].addr) begin
          if (bad < 4) $display("op %0d: we=%0d pat=%0d elem=%0d op=%0d addr=%0d", idx, op_we,
                                op_pat, op_elem, op_idx, addr);
          bad++;
        end
        idx++;
      end
      @(negedge clk);
      cyc++;
    end
    check(bad == 0, $sformatf("alg %0d: %0d operations wrong", alg, bad));
    check(idx == k * N, $sformatf("alg %0d: %0d operations, expected %0d", alg, idx, k * N));
    check(cyc == k * N + 2, $sformatf("alg %0d: %0d cycles, expected %0d", alg, cyc, k * N + 2));
    check(!busy && !op_valid, "idle when done");
    repeat (3) @(negedge clk);
    check(done && !op_valid, "done holds");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!busy && !done && !op_valid, "idle after reset");
    run(ALG_MARCH5N, 5);
    run(ALG_MATSPP, 6);
    run(ALG_MARCH5N, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
