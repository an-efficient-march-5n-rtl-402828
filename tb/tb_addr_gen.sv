// tb_addr_gen: self-checking test of the up/down address generator.
// Walks a full element upwards and downwards, checks every address and the
// 'last' flag against a counter kept here, and checks that 'load' wins over
// 'step' and that the counter holds when neither is given.
module tb_addr_gen;
  localparam int AW = 5;
  localparam int N  = 2**AW;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic load = 0, step = 0, down = 0;
  logic [AW-1:0] addr;
  logic dir_down, last;

  mbist_addr_gen #(.AW(AW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string w);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask

  task automatic walk(input bit dn);
    @(negedge clk); load = 1; down = dn; @(negedge clk); load = 0; down = ~dn;
    for (int k = 0; k < N; k++) begin
      int a = dn ? N - 1 - k : k;
      check(addr == AW'(a), $sformatf("dir %0d step %0d: addr %0d, expected %0d", dn, k, addr, a));
      check(last == (k == N - 1), $sformatf("dir %0d step %0d: last", dn, k));
      check(dir_down == dn, "direction kept");
      step = 1; @(negedge clk); step = 0;
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(addr == 0, "reset address");
    walk(0);
    walk(1);
    walk(0);
    // hold
    @(negedge clk); load = 1; down = 0; @(negedge clk); load = 0;
    step = 1; @(negedge clk); step = 0; @(negedge clk); @(negedge clk);
    check(addr == 1, "holds without step");
    // load wins over step
    load = 1; step = 1; down = 1; @(negedge clk); load = 0; step = 0;
    check(addr == AW'(N - 1) && dir_down, "load wins over step");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
