// tb_mbist_top: end-to-end test of the MBIST with diagnosis and repair, at
// the default size (32 words of 32 bits), against the behavioural faulty
// SRAM model.
//
// It checks, against values worked out here and not taken from the design:
//  - the exact memory operation sequence of March 5n and MATS++ on a
//    fault-free memory (address order, read/write, data) and the test
//    length, k*N + 2 cycles with k = 5 or 6;
//  - detection and diagnosis (address, failing bit, element, operation) of a
//    stuck-at-0, stuck-at-1, rising and falling transition fault, an
//    inversion coupling fault and an address decoder fault;
//  - merging of repeated failures at one address, log overflow, repair
//    programming, a clean re-test after repair, and system accesses that
//    are redirected to spares.
// Each of these mechanisms is counted; one that never happened is a failure.
module tb_mbist_top;
  import mbist_pkg::*;
  import sram_fault_pkg::*;

  localparam int AW = 5;
  localparam int DW = 32;
  localparam int N  = 2**AW;
  localparam int LD = 4;
  localparam int NF = 8;

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
  logic              repair_program = 1'b0, repair_clear = 1'b0;
  logic              repair_ok;
  logic [3:0]        spare_used;
  logic              sys_en = 1'b0, sys_we = 1'b0;
  logic [AW-1:0]     sys_addr = '0;
  logic [DW-1:0]     sys_wdata = '0;
  logic [DW-1:0]     sys_rdata;
  logic              sys_remapped;
  logic              mem_en, mem_we;
  logic [AW-1:0]     mem_addr;
  logic [DW-1:0]     mem_wdata, mem_rdata;
  fault_t            faults [NF];
  int unsigned       rd_count, wr_count;

  mbist_top dut (.*);

  sram_fault_model #(.AW(AW), .DW(DW), .NF(NF)) u_mem (
    .clk, .clr(1'b0), .en(mem_en), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .rdata(mem_rdata), .faults, .rd_count, .wr_count
  );

  int checks = 0, failures = 0;
  int n_march5n = 0, n_matspp = 0, n_down = 0, n_detect = 0, n_merge = 0;
  int n_overflow = 0, n_repair = 0, n_retest_pass = 0, n_remap = 0;
  int n_sys = 0, n_unrepairable = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- reference model of the algorithms, written independently ----------
  typedef struct { bit we; int pat; } ref_op_t;    // pat: 0,1,2=a,3=~a
  function automatic logic [DW-1:0] ref_data(int a, int pat);
    logic [DW-1:0] d;
    for (int i = 0; i < DW; i++) d[i] = a[i % AW];
    case (pat)
      0: return '0;
      1: return '1;
      2: return d;
      default: return ~d;
    endcase
  endfunction

  // Expected (we, addr, data) sequence of one algorithm.
  logic          exp_we   [$];
  logic [AW-1:0] exp_addr [$];
  logic [DW-1:0] exp_data [$];

  task automatic build_ref(input alg_e alg);
    int nel;
    bit down [3];
    ref_op_t ops [3][$];
    exp_we.delete(); exp_addr.delete(); exp_data.delete();
    for (int e = 0; e < 3; e++) ops[e].delete();
    if (alg == ALG_MARCH5N) begin
      // {<>(wa); ^(ra,wb); v(rb,wa)}
      down = '{0, 0, 1};
      ops[0].push_back('{1, 2});
      ops[1].push_back('{0, 2}); ops[1].push_back('{1, 3});
      ops[2].push_back('{0, 3}); ops[2].push_back('{1, 2});
    end else begin
      // {<>(w0); ^(r0,w1); v(r1,w0,r0)}
      down = '{0, 0, 1};
      ops[0].push_back('{1, 0});
      ops[1].push_back('{0, 0}); ops[1].push_back('{1, 1});
      ops[2].push_back('{0, 1}); ops[2].push_back('{1, 0}); ops[2].push_back('{0, 0});
    end
    nel = 3;
    for (int e = 0; e < nel; e++)
      for (int k = 0; k < N; k++) begin
        int a = down[e] ? N - 1 - k : k;
        foreach (ops[e][o]) begin
          exp_we.push_back(ops[e][o].we);
          exp_addr.push_back(AW'(a));
          exp_data.push_back(ref_data(a, ops[e][o].pat));
        end
      end
  endtask

  // ---- monitor: compares the memory port with the reference sequence -----
  bit            mon_on = 0;
  int            mon_idx = 0, mon_bad = 0;
  logic [AW-1:0] prev_addr;
  always @(posedge clk) begin
    if (mon_on && mem_en) begin
      if (mon_idx >= exp_we.size() || mem_we != exp_we[mon_idx] ||
          mem_addr != exp_addr[mon_idx] || (mem_we && mem_wdata != exp_data[mon_idx])) begin
        if (mon_bad < 5)
          $display("op %0d mismatch: we=%0d addr=%0d data=%h", mon_idx, mem_we, mem_addr, mem_wdata);
        mon_bad++;
      end
      if (mon_idx > 0 && mem_addr == prev_addr - 1'b1) n_down++;
      prev_addr = mem_addr;
      mon_idx++;
    end
  end

  // ---- helpers -------------------------------------------------------------
  task automatic clear_faults();
    foreach (faults[i]) faults[i] = NO_FAULT;
  endtask

  task automatic add_fault(input int i, input fault_kind_e k, input int a, input int b,
                           input int a2 = 0, input int b2 = 0);
    faults[i] = '{kind: k, addr: 8'(a), bit_: 8'(b), addr2: 8'(a2), bit2: 8'(b2)};
  endtask

  // Runs one self-test and returns its length in cycles (start to done).
  task automatic run_bist(input alg_e alg, output int cycles);
    @(negedge clk);
    bist_alg   = alg;
    bist_start = 1'b1;
    @(negedge clk);
    bist_start = 1'b0;
    cycles = 1;
    while (!bist_done) begin
      @(negedge clk);
      cycles++;
    end
    if (alg == ALG_MARCH5N) n_march5n++; else n_matspp++;
  endtask

  // Runs a test on a fault-free memory and checks sequence and length.
  task automatic clean_run(input alg_e alg, input int k);
    int cyc;
    int unsigned rd0, wr0;
    build_ref(alg);
    mon_idx = 0; mon_bad = 0; mon_on = 1;
    rd0 = rd_count; wr0 = wr_count;
    run_bist(alg, cyc);
    mon_on = 0;
    check(cyc == k * N + 2, $sformatf("test length %0d, expected %0d", cyc, k * N + 2));
    check(mon_idx == k * N, $sformatf("%0d memory operations, expected %0d", mon_idx, k * N));
    check(mon_bad == 0, $sformatf("%0d operations differ from the algorithm", mon_bad));
    check(rd_count - rd0 + wr_count - wr0 == k * N, "array access count");
    check(bist_pass && !bist_fail && fail_count == 0, "fault-free memory passes");
    check(log_valid == '0 && !log_overflow, "empty log on a fault-free memory");
  endtask

  // Runs March 5n with a single fault and checks the diagnosis.
  task automatic diag_run(input string name, input alg_e alg, input int a, input int b,
                          input int elem, input int op, input int nlog = 1);
    int cyc;
    run_bist(alg, cyc);
    check(bist_done && bist_fail && !bist_pass, {name, ": detected"});
    check(log_valid[0] && log_addr[0] == AW'(a), $sformatf("%s: log address %0d, expected %0d",
          name, log_addr[0], a));
    check(log_syndrome[0][b], {name, ": failing bit in syndrome"});
    check(log_elem[0] == ELEM_W'(elem) && log_op[0] == OP_W'(op),
          $sformatf("%s: first seen in element %0d op %0d, expected %0d/%0d", name,
                    log_elem[0], log_op[0], elem, op));
    check(log_valid == LD'((1 << nlog) - 1), $sformatf("%s: %0d addresses logged", name, nlog));
    if (bist_fail) n_detect++;
  endtask

  // System access through the redundancy logic.
  task automatic sys_write(input int a, input logic [DW-1:0] d);
    @(negedge clk);
    sys_en = 1; sys_we = 1; sys_addr = AW'(a); sys_wdata = d;
    #1 if (sys_remapped) n_remap++;
    @(negedge clk);
    sys_en = 0; sys_we = 0;
    n_sys++;
  endtask

  task automatic sys_read(input int a, output logic [DW-1:0] d);
    @(negedge clk);
    sys_en = 1; sys_we = 0; sys_addr = AW'(a);
    #1 if (sys_remapped) n_remap++;
    @(negedge clk);
    sys_en = 0;
    d = sys_rdata;
    n_sys++;
  endtask

  initial begin
    logic [DW-1:0] rd;
    int cyc;
    clear_faults();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 1. fault-free memory, both algorithms
    clean_run(ALG_MARCH5N, 5);
    clean_run(ALG_MATSPP, 6);
    check(n_down > 0, "descending address order seen");

    // 2. single faults, March 5n, diagnosis contents
    // Address 5 = 00101: bit 3 is 0 in wa, 1 in wb -> SA0 seen by rb (elem 2, op 0).
    clear_faults(); add_fault(0, F_SA0, 5, 3);
    diag_run("SA0", ALG_MARCH5N, 5, 3, 2, 0);
    // bit 0 is 1 in wa -> SA0 at bit 0 seen by ra (elem 1, op 0).
    clear_faults(); add_fault(0, F_SA0, 5, 0);
    diag_run("SA0 bit0", ALG_MARCH5N, 5, 0, 1, 0);
    // Address 10 = 01010: bit 0 is 0 in wa -> SA1 seen by ra.
    clear_faults(); add_fault(0, F_SA1, 10, 0);
    diag_run("SA1", ALG_MARCH5N, 10, 0, 1, 0);
    // Address 6 = 00110: bit 0 rises in wb, bit 1 falls in wb.
    clear_faults(); add_fault(0, F_TF_UP, 6, 0);
    diag_run("TF up", ALG_MARCH5N, 6, 0, 2, 0);
    clear_faults(); add_fault(0, F_TF_DN, 6, 1);
    diag_run("TF down", ALG_MARCH5N, 6, 1, 2, 0);
    // Aggressor (2, bit 0) rises in element 1 before victim 9 is read there.
    clear_faults(); add_fault(0, F_CFIN, 9, 4, 2, 0);
    diag_run("CFin", ALG_MARCH5N, 9, 4, 1, 0);
    // Address 12 decodes to word 20. Element 1: ra at 12 returns 20's value,
    // wb at 12 overwrites word 20, so ra at 20 fails as well. Element 2: rb
    // at 12 returns 20's value again. Three failures, two addresses.
    clear_faults(); add_fault(0, F_AF, 12, 3, 20, 0);
    diag_run("AF", ALG_MARCH5N, 12, 4, 1, 0, 2);
    check(fail_count == 3, $sformatf("AF: %0d failing reads, expected 3", fail_count));
    check(log_syndrome[0] == ((ref_data(12, 2) ^ ref_data(20, 2)) |
                              (ref_data(12, 3) ^ ref_data(20, 2))), "AF: merged syndrome");
    check(log_addr[1] == 20 && log_elem[1] == 1 && log_op[1] == 0 &&
          log_syndrome[1] == (ref_data(20, 2) ^ ref_data(12, 3)), "AF: second address");
    if (fail_count > 2 && log_valid == 4'b0011) n_merge++;
    // MATS++ catches the stuck-at-1 too: r0 in element 1.
    clear_faults(); add_fault(0, F_SA1, 10, 0);
    diag_run("SA1 MATS++", ALG_MATSPP, 10, 0, 1, 0);

    // 3. three faulty words: diagnose, repair, re-test, use.
    clear_faults();
    add_fault(0, F_SA0, 3, 0);      // 00011: bit0 1 in wa
    add_fault(1, F_SA1, 17, 1);     // 10001: bit1 0 in wa
    add_fault(2, F_TF_UP, 30, 0);   // 11110: bit0 rises in wb
    run_bist(ALG_MARCH5N, cyc);
    check(bist_fail && log_valid == 4'b0111 && !log_overflow, "three faulty words logged");
    check(log_addr[0] == 3 && log_addr[1] == 17 && log_addr[2] == 30, "log in order of detection");
    check(repair_ok, "three faulty words are repairable");
    @(negedge clk); repair_program = 1; @(negedge clk); repair_program = 0;
    check(spare_used == 4'b0111, "three spares allocated");
    n_repair++;
    run_bist(ALG_MARCH5N, cyc);
    check(bist_pass && fail_count == 0, "re-test after repair passes");
    check(cyc == 5 * N + 2, "re-test length");
    if (bist_pass) n_retest_pass++;
    run_bist(ALG_MATSPP, cyc);
    check(bist_pass, "MATS++ re-test after repair passes");
    sys_write(3, 32'hDEAD_BEEF);
    sys_write(4, 32'h1234_5678);
    sys_write(30, 32'h0000_0000);
    sys_read(3, rd);  check(rd == 32'hDEAD_BEEF, "repaired word 3 holds data");
    sys_read(4, rd);  check(rd == 32'h1234_5678, "healthy word 4 holds data");
    sys_read(30, rd); check(rd == 32'h0, "repaired word 30 holds data");
    check(n_remap == 4, $sformatf("%0d remapped system accesses, expected 4", n_remap));
    // Without the repair the stuck-at-0 shows through.
    @(negedge clk); repair_clear = 1; @(negedge clk); repair_clear = 0;
    sys_write(3, 32'hFFFF_FFFF);
    sys_read(3, rd);  check(rd == 32'hFFFF_FFFE, "unrepaired word 3 shows its fault");

    // 4. five faulty words: log overflow, not repairable.
    clear_faults();
    add_fault(0, F_SA1, 0, 0); add_fault(1, F_SA1, 2, 0); add_fault(2, F_SA1, 4, 0);
    add_fault(3, F_SA1, 6, 0); add_fault(4, F_SA1, 8, 0);
    run_bist(ALG_MARCH5N, cyc);
    check(bist_fail && log_overflow && log_valid == 4'b1111, "log overflow on five words");
    check(!repair_ok, "five faulty words are not repairable");
    if (log_overflow) n_overflow++;
    if (!repair_ok) n_unrepairable++;

    // 5. system accesses are ignored while the test runs.
    clear_faults();
    @(negedge clk);
    bist_alg = ALG_MARCH5N; bist_start = 1;
    @(negedge clk);
    bist_start = 0; sys_en = 1; sys_we = 1; sys_addr = 0; sys_wdata = '1;
    build_ref(ALG_MARCH5N);
    check(mem_en && mem_we && mem_addr == 0 && mem_wdata == ref_data(0, 2),
          "self-test owns the memory while busy");
    sys_en = 0; sys_we = 0;
    while (!bist_done) @(negedge clk);
    check(bist_pass, "test passes with system traffic held off");

    // mechanism coverage
    check(n_march5n > 0, "March 5n run");
    check(n_matspp > 0, "MATS++ run");
    check(n_down > 0, "descending element");
    check(n_detect >= 8, "fault detection");
    check(n_merge > 0, "failures merged in one log entry");
    check(n_overflow > 0, "log overflow");
    check(n_unrepairable > 0, "unrepairable verdict");
    check(n_repair > 0, "repair programming");
    check(n_retest_pass > 0, "clean re-test after repair");
    check(n_remap > 0, "remapped access");
    check(n_sys > 0, "system access");
    $display("mechanisms: march5n=%0d matspp=%0d down=%0d detect=%0d merge=%0d overflow=%0d repair=%0d retest=%0d remap=%0d sys=%0d",
             n_march5n, n_matspp, n_down, n_detect, n_merge, n_overflow, n_repair,
             n_retest_pass, n_remap, n_sys);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
