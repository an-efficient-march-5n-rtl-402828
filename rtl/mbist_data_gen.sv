// mbist_data_gen: data generator of the MBIST engine.
//
// Turns a data background code and the current address into a DW-bit word.
// The same word is the write data of a write and the expected data of a read.
//   PAT_ZERO  -> all zeros          (w0 / r0)
//   PAT_ONE   -> all ones           (w1 / r1)
//   PAT_ADDR  -> address value      (wa / ra)
//   PAT_NADDR -> complement address (wb / rb)
// The address is narrower than the word, so the address background repeats
// the address bits across the word: bit i of the word is address bit i mod AW.
// That repetition is this design's choice. Purely combinational.
module mbist_data_gen
  import mbist_pkg::*;
#(
  parameter int unsigned AW = 5,
  parameter int unsigned DW = 32
) (
  input  logic [AW-1:0] addr,
  input  pattern_e      pat,
  output logic [DW-1:0] data
);

  logic [DW-1:0] addr_bg;

  always_comb begin
    for (int unsigned i = 0; i < DW; i++) addr_bg[i] = addr[i % AW];
  end

  always_comb begin
    unique case (pat)
      PAT_ZERO:  data = '0;
      PAT_ONE:   data = '1;
      PAT_ADDR:  data = addr_bg;
      PAT_NADDR: data = ~addr_bg;
    endcase
  end

endmodule
