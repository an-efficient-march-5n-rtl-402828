// mbist_top: FSM-based memory built-in self-test with diagnosis and repair
// for one embedded SRAM of 2**AW words of DW bits (default 32 x 2**5, 1 kb).
//
// Blocks and data flow:
//   mbist_march_ctrl  runs March 5n (default) or MATS++, one operation/cycle
//   mbist_addr_gen    supplies the up/down address of each operation
//   mbist_data_gen    turns (address, background) into write/expected data
//   mbist_diag        compares read data, logs failing addresses + syndromes
//   mbist_redundancy  spare words that replace logged addresses
// The SRAM itself is outside this module, on the mem_* port. All accesses,
// from the self-test or from the system port, pass through the redundancy
// logic, so a test run after repair checks the repaired memory.
//
// Use:
//   1. pulse bist_start with bist_alg set; the test owns the memory while
//      bist_busy is high, system accesses are ignored meanwhile;
//   2. when bist_done rises, bist_pass / bist_fail give the verdict and the
//      log_* outputs the failing words, their failing bits (syndrome) and
//      the March element and operation that first saw each of them;
//   3. pulse repair_program to map the logged words onto spares;
//      repair_ok tells whether every failing word got a spare;
//   4. optionally run the test again to confirm the repair.
// Timing: bist_done rises k*2**AW + 2 cycles after bist_start is sampled,
// k = 5 for March 5n and 6 for MATS++. Reads (both ports) return data one
// cycle after the read, like the SRAM.
// The document gives the list of blocks, the algorithms and the memory
// sizes; interfaces, timing and the repair granularity are this design's.
module mbist_top
  import mbist_pkg::*;
#(
  parameter int unsigned AW        = 5,   // 2**5 words
  parameter int unsigned DW        = 32,  // 32-bit words
  parameter int unsigned LOG_DEPTH = 4,
  parameter int unsigned SPARES    = 4,
  parameter int unsigned CNT_W     = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // self-test control and result
  input  logic                 bist_start,
  input  alg_e                 bist_alg,
  output logic                 bist_busy,
  output logic                 bist_done,
  output logic                 bist_pass,
  output logic                 bist_fail,
  output logic                 bist_err,
  output logic [CNT_W-1:0]     fail_count,
  // diagnosis log
  output logic [LOG_DEPTH-1:0] log_valid,
  output logic [AW-1:0]        log_addr     [LOG_DEPTH],
  output logic [DW-1:0]        log_syndrome [LOG_DEPTH],
  output logic [ELEM_W-1:0]    log_elem     [LOG_DEPTH],
  output logic [OP_W-1:0]      log_op       [LOG_DEPTH],
  output logic                 log_overflow,
  // repair
  input  logic                 repair_program,
  input  logic                 repair_clear,
  output logic                 repair_ok,
  output logic [SPARES-1:0]    spare_used,
  // system (functional) access
  input  logic                 sys_en,
  input  logic                 sys_we,
  input  logic [AW-1:0]        sys_addr,
  input  logic [DW-1:0]        sys_wdata,
  output logic [DW-1:0]        sys_rdata,
  output logic                 sys_remapped,
  // memory under test
  output logic                 mem_en,
  output logic                 mem_we,
  output logic [AW-1:0]        mem_addr,
  output logic [DW-1:0]        mem_wdata,
  input  logic [DW-1:0]        mem_rdata
);

  logic              ag_load, ag_step, ag_down, ag_last;
  logic [AW-1:0]     t_addr;
  logic              op_valid, op_we;
  pattern_e          op_pat;
  logic [ELEM_W-1:0] op_elem;
  logic [OP_W-1:0]   op_idx;
  logic [DW-1:0]     t_data;
  logic [DW-1:0]     r_rdata;
  logic              r_en, r_we;
  logic [AW-1:0]     r_addr;
  logic [DW-1:0]     r_wdata;
  logic              diag_clear;

  mbist_march_ctrl u_ctrl (
    .clk, .rst_n,
    .start    (bist_start),
    .alg_sel  (bist_alg),
    .ag_load, .ag_step, .ag_down, .ag_last,
    .op_valid, .op_we, .op_pat, .op_elem, .op_idx,
    .busy     (bist_busy),
    .done     (bist_done)
  );

  mbist_addr_gen #(.AW(AW)) u_addr (
    .clk, .rst_n,
    .load     (ag_load),
    .step     (ag_step),
    .down     (ag_down),
    .addr     (t_addr),
    .dir_down (),
    .last     (ag_last)
  );

  mbist_data_gen #(.AW(AW), .DW(DW)) u_data (
    .addr (t_addr),
    .pat  (op_pat),
    .data (t_data)
  );

  assign diag_clear = bist_start && !bist_busy;

  mbist_diag #(.AW(AW), .DW(DW), .LOG_DEPTH(LOG_DEPTH), .CNT_W(CNT_W)) u_diag (
    .clk, .rst_n,
    .clear       (diag_clear),
    .rd_issue    (op_valid && !op_we),
    .rd_addr     (t_addr),
    .rd_expected (t_data),
    .rd_elem     (op_elem),
    .rd_op       (op_idx),
    .rdata       (r_rdata),
    .err         (bist_err),
    .fail        (bist_fail),
    .fail_count,
    .log_valid, .log_addr, .log_syndrome, .log_elem, .log_op, .log_overflow
  );

  // Test/functional access mux: the self-test owns the memory while busy.
  assign r_en    = bist_busy ? op_valid : sys_en;
  assign r_we    = bist_busy ? op_we    : sys_we;
  assign r_addr  = bist_busy ? t_addr   : sys_addr;
  assign r_wdata = bist_busy ? t_data   : sys_wdata;

  logic req_remapped;

  mbist_redundancy #(.AW(AW), .DW(DW), .SPARES(SPARES), .LOG_DEPTH(LOG_DEPTH)) u_red (
    .clk, .rst_n,
    .program_en   (repair_program),
    .unprogram    (repair_clear),
    .log_valid, .log_addr, .log_overflow,
    .repair_ok, .spare_used,
    .req_en       (r_en),
    .req_we       (r_we),
    .req_addr     (r_addr),
    .req_wdata    (r_wdata),
    .req_rdata    (r_rdata),
    .req_remapped,
    .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdata
  );

  assign sys_rdata    = r_rdata;
  assign sys_remapped = req_remapped && !bist_busy;
  assign bist_pass    = bist_done && !bist_fail;

endmodule
