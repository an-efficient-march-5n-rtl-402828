// mbist_redundancy: redundancy logic (word-level repair of the memory).
//
// SPARES spare words, each with an address register and a valid bit, sit in
// front of the memory under test. Every access (from the MBIST engine or
// from the system) is compared with the valid spare addresses. On a match
// the access goes to the spare word instead: a write updates the spare, a
// read returns it, and the memory is not enabled. Other accesses pass to the
// memory unchanged. Read data come back one cycle after the read, from the
// spare or from the memory, the same latency as the memory itself.
//
// 'program' (one cycle) loads the spare address registers from the
// diagnosis log: entry i of the log goes to spare i, so allocation takes a
// single cycle after the test. 'repair_ok' is high when every failing
// address found fitted in a spare (no log overflow and at most SPARES
// entries). 'unprogram' (one cycle) frees all spares.
// The document asks for redundant memory locations and a programmable
// address mapping that replaces defective cells; the choice of whole spare
// words held in flip-flops, and their number, are this design's. An
// assertion checks that no address matches two spares.
module mbist_redundancy #(
  parameter int unsigned AW        = 5,
  parameter int unsigned DW        = 32,
  parameter int unsigned SPARES    = 4,
  parameter int unsigned LOG_DEPTH = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // programming from the diagnosis log
  input  logic                 program_en,
  input  logic                 unprogram,
  input  logic [LOG_DEPTH-1:0] log_valid,
  input  logic [AW-1:0]        log_addr [LOG_DEPTH],
  input  logic                 log_overflow,
  output logic                 repair_ok,
  output logic [SPARES-1:0]    spare_used,
  // access port (logical addresses)
  input  logic                 req_en,
  input  logic                 req_we,
  input  logic [AW-1:0]        req_addr,
  input  logic [DW-1:0]        req_wdata,
  output logic [DW-1:0]        req_rdata,
  output logic                 req_remapped,
  // memory port
  output logic                 mem_en,
  output logic                 mem_we,
  output logic [AW-1:0]        mem_addr,
  output logic [DW-1:0]        mem_wdata,
  input  logic [DW-1:0]        mem_rdata
);

  localparam int unsigned IW = (SPARES > 1) ? $clog2(SPARES) : 1;

  logic [AW-1:0] spare_addr [SPARES];
  logic [DW-1:0] spare_data [SPARES];
  logic          hit;
  logic [IW-1:0] hit_idx;
  logic          hit_q;
  logic [DW-1:0] spare_rdata_q;

  always_comb begin
    hit     = 1'b0;
    hit_idx = '0;
    for (int i = SPARES - 1; i >= 0; i--) begin
      if (spare_used[i] && spare_addr[i] == req_addr) begin
        hit     = 1'b1;
        hit_idx = IW'(i);
      end
    end
  end

  // Spare address registers (the "fuses").
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      spare_used <= '0;
      for (int i = 0; i < SPARES; i++) spare_addr[i] <= '0;
    end else if (unprogram) begin
      spare_used <= '0;
    end else if (program_en) begin
      for (int i = 0; i < SPARES; i++) begin
        if (i < LOG_DEPTH) begin
          spare_used[i] <= log_valid[i];
          spare_addr[i] <= log_addr[i];
        end else begin
          spare_used[i] <= 1'b0;
        end
      end
    end
  end

  logic too_many;
  always_comb begin
    too_many = 1'b0;
    for (int i = SPARES; i < LOG_DEPTH; i++) too_many |= log_valid[i];
  end
  assign repair_ok = !log_overflow && !too_many;

  // Spare storage and read path.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hit_q         <= 1'b0;
      spare_rdata_q <= '0;
      for (int i = 0; i < SPARES; i++) spare_data[i] <= '0;
    end else begin
      if (req_en && !req_we) begin
        hit_q         <= hit;
        spare_rdata_q <= spare_data[hit_idx];
      end
      if (req_en && req_we && hit) spare_data[hit_idx] <= req_wdata;
    end
  end

  // The diagnosis log holds distinct addresses, so at most one spare matches.
  logic [SPARES-1:0] match_vec;
  always_comb begin
    for (int i = 0; i < SPARES; i++) match_vec[i] = spare_used[i] && spare_addr[i] == req_addr;
  end
  a_one_spare_per_address: assert property (@(posedge clk) disable iff (!rst_n)
    req_en |-> $onehot0(match_vec));

  assign mem_en       = req_en && !hit;
  assign mem_we       = req_we;
  assign mem_addr     = req_addr;
  assign mem_wdata    = req_wdata;
  assign req_rdata    = hit_q ? spare_rdata_q : mem_rdata;
  assign req_remapped = req_en && hit;

endmodule
