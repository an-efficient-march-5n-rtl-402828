// tb_mbist_2kb: the MBIST on the larger memory, 2 kb as 64 words of 32 bits
// (AW = 6). Checks the test length of March 5n (5*64 + 2 cycles) and
// MATS++ (6*64 + 2) on a fault-free memory, diagnosis of faults in the upper
// half of the address space (a stuck-at, a transition, a coupling and an
// address decoder fault), repair with the four spares and a clean re-test.
module tb_mbist_2kb;
  import mbist_pkg::*;
  import sram_fault_pkg::*;

  localparam int AW = 6;
  localparam int DW = 32;
  localparam int N  = 2**AW;
  localparam int LD = 4;
  localparam int NF = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              bist_start = 1'b0;
  alg_e              bist_alg = ALG_MARCH5N;
  logic              bist_busy, bist_done, bist_pass, bist_fail, bist_err;
  logic [15:0]       fail_count;
  logic [LD-1:0]     log_valid;
  logic [AW-1:0]     log_addr     [LD];
  logic [DW-1:0]     log_syndrome [LD];
  logic [ELEM_W-1:0] log_elem     [LD];
  logic [OP_W-1:0]   log_op       [LD];
  logic              log_overflow;
  logic              repair_program = 1'b0;
  logic              repair_ok;
  logic [3:0]        spare_used;
  logic [DW-1:0]     sys_rdata;
  logic              sys_remapped;
  logic              mem_en, mem_we;
  logic [AW-1:0]     mem_addr;
  logic [DW-1:0]     mem_wdata, mem_rdata;
  fault_t            faults [NF];
  int unsigned       rd_count, wr_count;

  mbist_top #(.AW(AW)) dut (
    .clk, .rst_n, .bist_start, .bist_alg, .bist_busy, .bist_done, .bist_pass, .bist_fail,
    .bist_err, .fail_count, .log_valid, .log_addr, .log_syndrome, .log_elem, .log_op,
    .log_overflow, .repair_program, .repair_clear(1'b0), .repair_ok, .spare_used,
    .sys_en(1'b0), .sys_we(1'b0), .sys_addr('0), .sys_wdata('0), .sys_rdata, .sys_remapped,
    .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdata
  );

  sram_fault_model #(.AW(AW), .DW(DW), .NF(NF)) u_mem (
    .clk, .clr(1'b0), .en(mem_en), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .rdata(mem_rdata), .faults, .rd_count, .wr_count
  );

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_bist(input alg_e alg, output int cycles);
    @(negedge clk);
    bist_alg = alg; bist_start = 1'b1;
    @(negedge clk);
    bist_start = 1'b0;
    cycles = 1;
    while (!bist_done) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  function automatic bit logged(int a);
    for (int i = 0; i < LD; i++) if (log_valid[i] && log_addr[i] == AW'(a)) return 1;
    return 0;
  endfunction

  initial begin
    int cyc;
    int unsigned ops0;
    foreach (faults[i]) faults[i] = NO_FAULT;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    ops0 = rd_count + wr_count;
    run_bist(ALG_MARCH5N, cyc);
    check(cyc == 5 * N + 2 && bist_pass, $sformatf("March 5n: %0d cycles, pass %0d", cyc, bist_pass));
    check(rd_count + wr_count - ops0 == 5 * N, "March 5n: 5n memory operations");
    ops0 = rd_count + wr_count;
    run_bist(ALG_MATSPP, cyc);
    check(cyc == 6 * N + 2 && bist_pass, $sformatf("MATS++: %0d cycles, pass %0d", cyc, bist_pass));
    check(rd_count + wr_count - ops0 == 6 * N, "MATS++: 6n memory operations");

    // 37 = 100101: bit 1 is 0 in wa -> SA1 seen by ra.
    faults[0] = '{kind: F_SA1,   addr: 8'd37, bit_: 8'd1,  addr2: 8'd0,  bit2: 8'd0};
    // 50 = 110010: bit 0 rises in wb.
    faults[1] = '{kind: F_TF_UP, addr: 8'd50, bit_: 8'd0,  addr2: 8'd0,  bit2: 8'd0};
    // aggressor 33 bit 2 rises in wb (33 = 100001) before victim 60 is read.
    faults[2] = '{kind: F_CFIN,  addr: 8'd60, bit_: 8'd7,  addr2: 8'd33, bit2: 8'd2};
    run_bist(ALG_MARCH5N, cyc);
    check(bist_fail && logged(37) && logged(50) && logged(60) && log_valid == 4'b0111,
          "three faults diagnosed in the upper half");
    check(repair_ok, "repairable");
    @(negedge clk); repair_program = 1; @(negedge clk); repair_program = 0;
    run_bist(ALG_MARCH5N, cyc);
    check(bist_pass, "March 5n re-test after repair passes");
    run_bist(ALG_MATSPP, cyc);
    check(bist_pass, "MATS++ re-test after repair passes");

    // a decoder fault on top of the repaired ones
    faults[3] = '{kind: F_AF, addr: 8'd41, bit_: 8'd0, addr2: 8'd62, bit2: 8'd0};
    run_bist(ALG_MARCH5N, cyc);
    check(bist_fail && logged(41), "address decoder fault diagnosed");
    check(log_valid == 4'b0011 && logged(62), "decoder fault disturbs the target word too");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
