// mbist_addr_gen: address generator of the MBIST engine.
//
// An up/down counter over the 2**AW words of the memory under test. 'load'
// starts a March element: it stores the direction given on 'down' and sets
// the counter to the element's first address, 0 when counting up and
// 2**AW-1 when counting down. 'step' moves the counter one address in the
// stored direction. 'last' is high while the counter holds the final address
// of the element, so the March controller can move to the next element
// without an idle cycle. 'load' wins over 'step'.
// The document names this block and the two address orders; the counter
// itself is this design's own.
// Timing: 'addr', 'dir_down' and 'last' change on the clock edge after
// 'load' or 'step'.
module mbist_addr_gen #(
  parameter int unsigned AW = 5           // 32 words (1 kb of 32-bit words)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic          step,
  input  logic          down,
  output logic [AW-1:0] addr,
  output logic          dir_down,
  output logic          last
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr     <= '0;
      dir_down <= 1'b0;
    end else if (load) begin
      addr     <= down ? '1 : '0;
      dir_down <= down;
    end else if (step) begin
      addr     <= dir_down ? addr - 1'b1 : addr + 1'b1;
    end
  end

  assign last = dir_down ? (addr == '0) : (addr == '1);

endmodule
