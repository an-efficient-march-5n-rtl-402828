// mbist_diag: diagnosis module (response comparator and fault log).
//
// For every read the March controller issues, the module keeps the address,
// the expected word and the element/operation position for one cycle, until
// the memory returns the read data (one-cycle synchronous read). It then
// compares the two words; the XOR of them is the failure syndrome, one bit
// per failing data bit.
//
// Every failing read raises 'err' for one cycle, sets the sticky 'fail' flag
// and increments 'fail_count' (saturating). The log holds up to LOG_DEPTH
// distinct failing addresses. A failure at an address already in the log
// ORs its syndrome into that entry, so one entry gathers every failing bit of
// one word over the whole test; the entry also keeps the element and
// operation of the first failure at that address, which tells the kind of
// fault apart. A failure at a new address when the log is full sets
// 'log_overflow'. 'clear' (one cycle, at test start) empties everything.
//
// The log is what the redundancy logic reads to choose which words to
// replace, so spare allocation needs no second pass over the memory.
// The document gives the purpose (collect fault address and data during the
// test and report the diagnosis); the log format, its depth and the merging
// of repeated failures are this design's choices. Assertions check that the
// log fills in order and overflows only when full.
module mbist_diag
  import mbist_pkg::*;
#(
  parameter int unsigned AW        = 5,
  parameter int unsigned DW        = 32,
  parameter int unsigned LOG_DEPTH = 4,
  parameter int unsigned CNT_W     = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  // read issued this cycle
  input  logic                 rd_issue,
  input  logic [AW-1:0]        rd_addr,
  input  logic [DW-1:0]        rd_expected,
  input  logic [ELEM_W-1:0]    rd_elem,
  input  logic [OP_W-1:0]      rd_op,
  // read data, one cycle after rd_issue
  input  logic [DW-1:0]        rdata,
  // results
  output logic                 err,
  output logic                 fail,
  output logic [CNT_W-1:0]     fail_count,
  output logic [LOG_DEPTH-1:0] log_valid,
  output logic [AW-1:0]        log_addr     [LOG_DEPTH],
  output logic [DW-1:0]        log_syndrome [LOG_DEPTH],
  output logic [ELEM_W-1:0]    log_elem     [LOG_DEPTH],
  output logic [OP_W-1:0]      log_op       [LOG_DEPTH],
  output logic                 log_overflow
);

  logic              cmp_valid;
  logic [AW-1:0]     cmp_addr;
  logic [DW-1:0]     cmp_exp;
  logic [ELEM_W-1:0] cmp_elem;
  logic [OP_W-1:0]   cmp_op;
  logic [DW-1:0]     syndrome;

  // Read pipeline stage: aligns the expectation with the read data.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmp_valid <= 1'b0;
      cmp_addr  <= '0;
      cmp_exp   <= '0;
      cmp_elem  <= '0;
      cmp_op    <= '0;
    end else begin
      cmp_valid <= rd_issue && !clear;
      cmp_addr  <= rd_addr;
      cmp_exp   <= rd_expected;
      cmp_elem  <= rd_elem;
      cmp_op    <= rd_op;
    end
  end

  assign syndrome = rdata ^ cmp_exp;
  assign err      = cmp_valid && (syndrome != '0);

  // Log lookup: entry holding the failing address, or the first free entry.
  localparam int unsigned IW = (LOG_DEPTH > 1) ? $clog2(LOG_DEPTH) : 1;

  logic          hit;
  logic [IW-1:0] hit_idx;
  logic          has_free;
  logic [IW-1:0] free_idx;

  always_comb begin
    hit      = 1'b0;
    hit_idx  = '0;
    has_free = 1'b0;
    free_idx = '0;
    for (int i = LOG_DEPTH - 1; i >= 0; i--) begin
      if (log_valid[i] && log_addr[i] == cmp_addr) begin
        hit     = 1'b1;
        hit_idx = IW'(i);
      end
      if (!log_valid[i]) begin
        has_free = 1'b1;
        free_idx = IW'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fail         <= 1'b0;
      fail_count   <= '0;
      log_valid    <= '0;
      log_overflow <= 1'b0;
      for (int i = 0; i < LOG_DEPTH; i++) begin
        log_addr[i]     <= '0;
        log_syndrome[i] <= '0;
        log_elem[i]     <= '0;
        log_op[i]       <= '0;
      end
    end else if (clear) begin
      fail         <= 1'b0;
      fail_count   <= '0;
      log_valid    <= '0;
      log_overflow <= 1'b0;
    end else if (err) begin
      fail <= 1'b1;
      if (fail_count != '1) fail_count <= fail_count + 1'b1;
      if (hit) begin
        log_syndrome[hit_idx] <= log_syndrome[hit_idx] | syndrome;
      end else if (has_free) begin
        log_valid[free_idx]    <= 1'b1;
        log_addr[free_idx]     <= cmp_addr;
        log_syndrome[free_idx] <= syndrome;
        log_elem[free_idx]     <= cmp_elem;
        log_op[free_idx]       <= cmp_op;
      end else begin
        log_overflow <= 1'b1;
      end
    end
  end

  // Entries are filled from 0 upwards, and overflow only happens when full.
  a_log_filled_in_order: assert property (@(posedge clk) disable iff (!rst_n)
    ((log_valid + 1'b1) & log_valid) == '0);
  a_overflow_when_full: assert property (@(posedge clk) disable iff (!rst_n)
    log_overflow |-> &log_valid);

endmodule
