// sram_fault_model: behavioural model of the single-port synchronous SRAM
// under test, with injectable faults. Not synthesizable logic: it stands in
// for the SRAM macro in the testbenches.
//
// One access per cycle when 'en' is high: a write stores 'wdata' at 'addr',
// a read returns the word at 'addr' on 'rdata' one cycle later. Up to NF
// faults from sram_fault_pkg are active at once (stuck-at, transition,
// inversion coupling, address decoder). 'clr' zeroes the array so that
// runs start from a known state. 'rd_count' and 'wr_count' count the
// accesses that reached the array.
module sram_fault_model
  import sram_fault_pkg::*;
#(
  parameter int unsigned AW = 5,
  parameter int unsigned DW = 32,
  parameter int unsigned NF = 8
) (
  input  logic          clk,
  input  logic          clr,     // set every word to 0 (test set-up only)
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata,
  input  fault_t        faults [NF],
  output int unsigned   rd_count,
  output int unsigned   wr_count
);

  logic [DW-1:0] mem [2**AW];

  initial begin
    rd_count = 0;
    wr_count = 0;
    rdata    = '0;
    for (int i = 0; i < 2**AW; i++) mem[i] = '0;
  end

  function automatic logic [AW-1:0] decode(logic [AW-1:0] a);
    logic [AW-1:0] r = a;
    for (int f = 0; f < NF; f++)
      if (faults[f].kind == F_AF && faults[f].addr == 8'(a)) r = AW'(faults[f].addr2);
    return r;
  endfunction

  function automatic logic [DW-1:0] apply_saf(logic [AW-1:0] a, logic [DW-1:0] d);
    logic [DW-1:0] r = d;
    for (int f = 0; f < NF; f++) begin
      if (faults[f].kind == F_SA0 && faults[f].addr == 8'(a)) r[$clog2(DW)'(faults[f].bit_)] = 1'b0;
      if (faults[f].kind == F_SA1 && faults[f].addr == 8'(a)) r[$clog2(DW)'(faults[f].bit_)] = 1'b1;
    end
    return r;
  endfunction

  always @(posedge clk) begin
    logic [AW-1:0] ea;
    logic [DW-1:0] old_w, new_w;
    if (clr) begin
      for (int i = 0; i < 2**AW; i++) mem[i] = '0;
    end else if (en) begin
      ea = decode(addr);
      if (we) begin
        wr_count <= wr_count + 1;
        old_w = mem[ea];
        new_w = wdata;
        for (int f = 0; f < NF; f++) begin
          if (faults[f].addr == 8'(ea)) begin
            if (faults[f].kind == F_TF_UP && !old_w[$clog2(DW)'(faults[f].bit_)] && new_w[$clog2(DW)'(faults[f].bit_)])
              new_w[$clog2(DW)'(faults[f].bit_)] = 1'b0;
            if (faults[f].kind == F_TF_DN && old_w[$clog2(DW)'(faults[f].bit_)] && !new_w[$clog2(DW)'(faults[f].bit_)])
              new_w[$clog2(DW)'(faults[f].bit_)] = 1'b1;
          end
        end
        new_w = apply_saf(ea, new_w);
        mem[ea] = new_w;
        for (int f = 0; f < NF; f++) begin
          if (faults[f].kind == F_CFIN && faults[f].addr2 == 8'(ea) &&
              old_w[$clog2(DW)'(faults[f].bit2)] != new_w[$clog2(DW)'(faults[f].bit2)])
            mem[AW'(faults[f].addr)][$clog2(DW)'(faults[f].bit_)] = ~mem[AW'(faults[f].addr)][$clog2(DW)'(faults[f].bit_)];
        end
      end else begin
        rd_count <= rd_count + 1;
        rdata <= apply_saf(ea, mem[ea]);
      end
    end
  end

endmodule
