// tb_data_gen: self-checking test of the data generator. For every address
// and every background, the word is compared with one built bit by bit here
// (bit i of the address background is address bit i mod AW).
module tb_data_gen;
  import mbist_pkg::*;
  localparam int AW = 5;
  localparam int DW = 32;

  logic [AW-1:0] addr;
  pattern_e      pat;
  logic [DW-1:0] data;

  mbist_data_gen #(.AW(AW), .DW(DW)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int a = 0; a < 2**AW; a++) begin
      for (int p = 0; p < 4; p++) begin
        logic [DW-1:0] e;
        addr = AW'(a);
        pat  = pattern_e'(p);
        #1;
        for (int i = 0; i < DW; i++) begin
          case (p)
            0: e[i] = 1'b0;
            1: e[i] = 1'b1;
            2: e[i] = ((a >> (i % AW)) & 1) != 0;
            default: e[i] = ((a >> (i % AW)) & 1) == 0;
          endcase
        end
        checks++;
        if (data !== e) begin
          failures++;
          $display("FAIL: addr %0d pattern %0d: %h, expected %h", a, p, data, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
