// tb_redundancy: self-checking test of the redundancy logic. A plain memory
// array here stands for the SRAM. The test programs spares from a log,
// checks that accesses to those addresses stay off the memory port and read
// back from the spares with one-cycle latency, that other accesses reach the
// memory unchanged, the repair_ok verdict, and unprogramming.
module tb_redundancy;
  localparam int AW = 5;
  localparam int DW = 32;
  localparam int SP = 4;
  localparam int LD = 6;   // a log longer than the spares, to test repair_ok

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          program_en = 0, unprogram = 0;
  logic [LD-1:0] log_valid = '0;
  logic [AW-1:0] log_addr [LD];
  logic          log_overflow = 0;
  logic          repair_ok;
  logic [SP-1:0] spare_used;
  logic          req_en = 0, req_we = 0;
  logic [AW-1:0] req_addr = '0;
  logic [DW-1:0] req_wdata = '0;
  logic [DW-1:0] req_rdata;
  logic          req_remapped;
  logic          mem_en, mem_we;
  logic [AW-1:0] mem_addr;
  logic [DW-1:0] mem_wdata, mem_rdata;

  mbist_redundancy #(.AW(AW), .DW(DW), .SPARES(SP), .LOG_DEPTH(LD)) dut (.*);

  logic [DW-1:0] mem [2**AW];
  int mem_acc = 0;
  always @(posedge clk) if (mem_en) begin
    mem_acc++;
    if (mem_we) mem[mem_addr] <= mem_wdata;
    else        mem_rdata <= mem[mem_addr];
  end

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string w);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask

  logic [DW-1:0] model [2**AW];   // what a read of each address must return
  bit            spared [2**AW];

  task automatic wr(input int a, input logic [DW-1:0] d);
    int m0 = mem_acc;
    @(negedge clk); req_en = 1; req_we = 1; req_addr = AW'(a); req_wdata = d;
    #1 check(req_remapped == spared[a] && mem_en == !spared[a], $sformatf("write %0d routing", a));
    @(negedge clk); req_en = 0; req_we = 0;
    check(mem_acc - m0 == (spared[a] ? 0 : 1), $sformatf("write %0d memory access", a));
    model[a] = d;
  endtask

  task automatic rd(input int a);
    @(negedge clk); req_en = 1; req_we = 0; req_addr = AW'(a);
    #1 check(req_remapped == spared[a] && mem_en == !spared[a], $sformatf("read %0d routing", a));
    @(negedge clk); req_en = 0; req_addr = AW'($urandom);
    check(req_rdata == model[a], $sformatf("read %0d: %h, expected %h", a, req_rdata, model[a]));
  endtask

  initial begin
    foreach (log_addr[i]) log_addr[i] = '0;
    foreach (mem[i]) mem[i] = '0;
    foreach (spared[i]) spared[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(spare_used == '0 && repair_ok, "no spares after reset");
    for (int a = 0; a < 2**AW; a++) wr(a, $urandom);
    for (int a = 0; a < 2**AW; a++) rd(a);
    // program three spares
    log_valid = 6'b000111; log_addr[0] = 4; log_addr[1] = 19; log_addr[2] = 31;
    check(repair_ok, "three entries repairable");
    @(negedge clk); program_en = 1; @(negedge clk); program_en = 0;
    check(spare_used == 4'b0111, "three spares used");
    spared[4] = 1; spared[19] = 1; spared[31] = 1;
    for (int a = 0; a < 2**AW; a++) wr(a, $urandom);
    for (int r = 0; r < 100; r++) begin
      automatic int a = $urandom_range(0, 2**AW - 1);
      if ($urandom_range(0, 1) == 1) wr(a, $urandom); else rd(a);
    end
    for (int a = 0; a < 2**AW; a++) rd(a);
    // verdicts
    log_valid = 6'b011111;
    #1 check(!repair_ok, "five entries with four spares not repairable");
    log_valid = 6'b001111; log_overflow = 1;
    #1 check(!repair_ok, "overflow not repairable");
    log_overflow = 0;
    #1 check(repair_ok, "four entries repairable");
    // unprogram: spared addresses go back to the memory
    @(negedge clk); unprogram = 1; @(negedge clk); unprogram = 0;
    check(spare_used == '0, "spares freed");
    spared[4] = 0; spared[19] = 0; spared[31] = 0;
    for (int a = 0; a < 2**AW; a++) wr(a, $urandom);
    for (int a = 0; a < 2**AW; a++) rd(a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
