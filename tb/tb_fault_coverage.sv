// tb_fault_coverage: single-fault campaign on the full-size MBIST (32 words
// of 32 bits), run with March 5n and with MATS++.
//
// Every cell gets, one at a time, a stuck-at-0, stuck-at-1, rising and
// falling transition fault; every ordered address pair gets an address
// decoder fault (accesses to A reach word B); 2000 random cell pairs get an
// inversion coupling fault. Before each run the array is zeroed so the
// result does not depend on the previous run. A fault counts as covered
// when the test ends with bist_fail. The test also checks that every failing
// run logged the faulty address (for a decoder fault, A or B), and the coverage against rules worked out
// here:
//  - stuck-at and address decoder faults: 100 % for both algorithms;
//  - transition faults: 100 % for MATS++; for March 5n from a zeroed array
//    a falling-transition fault in a cell whose address-background bit is 0
//    is missed (that cell falls only in the last write, which is never read
//    back), every other transition fault is caught: 75 %.
// Inversion coupling coverage is measured and printed.
module tb_fault_coverage;
  import mbist_pkg::*;
  import sram_fault_pkg::*;

  localparam int AW = 5;
  localparam int DW = 32;
  localparam int N  = 2**AW;
  localparam int LD = 4;
  localparam int NF = 1;
  localparam int N_CFIN = 2000;

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
  logic              repair_ok;
  logic [3:0]        spare_used;
  logic [DW-1:0]     sys_rdata;
  logic              sys_remapped;
  logic              mem_en, mem_we;
  logic [AW-1:0]     mem_addr;
  logic [DW-1:0]     mem_wdata, mem_rdata;
  fault_t            faults [NF];
  int unsigned       rd_count, wr_count;
  logic              clr = 1'b0;

  mbist_top dut (
    .clk, .rst_n, .bist_start, .bist_alg, .bist_busy, .bist_done, .bist_pass, .bist_fail,
    .bist_err, .fail_count, .log_valid, .log_addr, .log_syndrome, .log_elem, .log_op,
    .log_overflow, .repair_program(1'b0), .repair_clear(1'b0), .repair_ok, .spare_used,
    .sys_en(1'b0), .sys_we(1'b0), .sys_addr('0), .sys_wdata('0), .sys_rdata, .sys_remapped,
    .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdata
  );

  sram_fault_model #(.AW(AW), .DW(DW), .NF(NF)) u_mem (
    .clk, .clr, .en(mem_en), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
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

  function automatic bit bg_bit(int a, int b);   // address-background bit
    return ((a >> (b % AW)) & 1) != 0;
  endfunction

  // Runs one test with one fault; returns 1 when detected.
  int n_logmiss = 0;
  task automatic run_one(input alg_e alg, input fault_t f, input int logged_addr, output bit det,
                         input int alt_addr = -1);
    faults[0] = f;
    @(negedge clk); clr = 1;
    @(negedge clk); clr = 0; bist_alg = alg; bist_start = 1;
    @(negedge clk); bist_start = 0;
    while (!bist_done) @(negedge clk);
    det = bist_fail;
    if (det && logged_addr >= 0) begin
      bit found = 0;
      for (int i = 0; i < LD; i++) if (log_valid[i] && (log_addr[i] == AW'(logged_addr) ||
                            (alt_addr >= 0 && log_addr[i] == AW'(alt_addr)))) found = 1;
      if (!found && !log_overflow) begin
        n_logmiss++;
        if (n_logmiss < 6) $display("alg %0d kind %0d addr %0d bit %0d addr2 %0d: log %b %0d %0d", alg, f.kind, f.addr, f.bit_, f.addr2, log_valid, log_addr[0], log_addr[1]);
      end
    end
  endtask

  initial begin
    int det_saf [2], det_tf [2], det_af [2], det_cf [2];
    int exp_tf5;
    bit d;
    fault_t f;
    faults[0] = NO_FAULT;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    det_saf = '{0, 0}; det_tf = '{0, 0}; det_af = '{0, 0}; det_cf = '{0, 0};
    exp_tf5 = 0;
    for (int alg = 0; alg < 2; alg++) begin
      for (int a = 0; a < N; a++)
        for (int b = 0; b < DW; b++) begin
          f = '{kind: F_SA0, addr: 8'(a), bit_: 8'(b), addr2: 8'd0, bit2: 8'd0};
          run_one(alg_e'(alg), f, a, d); det_saf[alg] += d;
          f.kind = F_SA1;
          run_one(alg_e'(alg), f, a, d); det_saf[alg] += d;
          f.kind = F_TF_UP;
          run_one(alg_e'(alg), f, a, d); det_tf[alg] += d;
          f.kind = F_TF_DN;
          run_one(alg_e'(alg), f, a, d); det_tf[alg] += d;
          if (alg == 0) exp_tf5 += bg_bit(a, b) ? 2 : 1;
        end
      for (int a = 0; a < N; a++)
        for (int a2 = 0; a2 < N; a2++)
          if (a != a2) begin
            f = '{kind: F_AF, addr: 8'(a), bit_: 8'd0, addr2: 8'(a2), bit2: 8'd0};
            run_one(alg_e'(alg), f, a, d, a2); det_af[alg] += d;
          end
    end
    // coupling faults: same random pairs for both algorithms
    for (int k = 0; k < N_CFIN; k++) begin
      f = '{kind: F_CFIN, addr: 8'($urandom_range(0, N - 1)), bit_: 8'($urandom_range(0, DW - 1)),
            addr2: 8'($urandom_range(0, N - 1)), bit2: 8'($urandom_range(0, DW - 1))};
      if (f.addr == f.addr2 && f.bit_ == f.bit2) f.bit2 = 8'((int'(f.bit2) + 1) % DW);
      for (int alg = 0; alg < 2; alg++) begin
        run_one(alg_e'(alg), f, -1, d); det_cf[alg] += d;
      end
    end
    for (int alg = 0; alg < 2; alg++)
      $display("%s: SAF %0d/%0d  TF %0d/%0d  AF %0d/%0d  CFin %0d/%0d",
               alg == 0 ? "March 5n" : "MATS++  ", det_saf[alg], 2 * N * DW, det_tf[alg],
               2 * N * DW, det_af[alg], N * (N - 1), det_cf[alg], N_CFIN);
    check(det_saf[0] == 2 * N * DW, "March 5n covers every stuck-at fault");
    check(det_saf[1] == 2 * N * DW, "MATS++ covers every stuck-at fault");
    check(det_af[0] == N * (N - 1), "March 5n covers every address decoder fault");
    check(det_af[1] == N * (N - 1), "MATS++ covers every address decoder fault");
    check(det_tf[1] == 2 * N * DW, "MATS++ covers every transition fault");
    check(det_tf[0] == exp_tf5, $sformatf("March 5n transition faults %0d, expected %0d",
                                          det_tf[0], exp_tf5));
    check(det_cf[0] > 0 && det_cf[1] > 0, "coupling faults detected");
    check(n_logmiss == 0, $sformatf("%0d detected faults without their address logged", n_logmiss));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
