// tb_diag: self-checking test of the diagnosis module. Issues reads with
// expected words, returns read data one cycle later (sometimes wrong), and
// checks the error pulse, the sticky fail flag, the failure count and the
// log (address, OR-merged syndrome, first element/operation, overflow)
// against a log kept here.
module tb_diag;
  import mbist_pkg::*;
  localparam int AW = 5;
  localparam int DW = 32;
  localparam int LD = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              clear = 0, rd_issue = 0;
  logic [AW-1:0]     rd_addr = '0;
  logic [DW-1:0]     rd_expected = '0;
  logic [ELEM_W-1:0] rd_elem = '0;
  logic [OP_W-1:0]   rd_op = '0;
  logic [DW-1:0]     rdata = '0;
  logic              err, fail;
  logic [15:0]       fail_count;
  logic [LD-1:0]     log_valid;
  logic [AW-1:0]     log_addr     [LD];
  logic [DW-1:0]     log_syndrome [LD];
  logic [ELEM_W-1:0] log_elem     [LD];
  logic [OP_W-1:0]   log_op       [LD];
  logic              log_overflow;

  mbist_diag #(.AW(AW), .DW(DW), .LOG_DEPTH(LD)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string w);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask

  // reference log
  int          m_n = 0, m_fails = 0;
  bit          m_ovf = 0;
  int          m_addr [LD];
  logic [DW-1:0] m_syn [LD];
  int          m_elem [LD], m_op [LD];

  task automatic ref_clear();
    m_n = 0; m_fails = 0; m_ovf = 0;
  endtask

  // One read: issue, then data next cycle; checks err in the data cycle.
  task automatic do_read(input int a, input logic [DW-1:0] exp_w, input logic [DW-1:0] flip,
                         input int e, input int o);
    int hit = -1;
    @(negedge clk);
    rd_issue = 1; rd_addr = AW'(a); rd_expected = exp_w; rd_elem = ELEM_W'(e); rd_op = OP_W'(o);
    @(negedge clk);
    rd_issue = 0; rd_expected = $urandom; rd_addr = AW'($urandom);
    rdata = exp_w ^ flip;
    #1;
    check(err == (flip != 0), $sformatf("err for addr %0d flip %h", a, flip));
    if (flip != 0) begin
      m_fails++;
      for (int i = 0; i < m_n; i++) if (m_addr[i] == a) hit = i;
      if (hit >= 0) m_syn[hit] |= flip;
      else if (m_n < LD) begin
        m_addr[m_n] = a; m_syn[m_n] = flip; m_elem[m_n] = e; m_op[m_n] = o; m_n++;
      end else m_ovf = 1;
    end
  endtask

  task automatic compare(input string w);
    @(negedge clk);
    check(fail == (m_fails > 0), {w, ": fail flag"});
    check(fail_count == 16'(m_fails), $sformatf("%s: count %0d, expected %0d", w, fail_count, m_fails));
    check(log_overflow == m_ovf, {w, ": overflow"});
    for (int i = 0; i < LD; i++) begin
      check(log_valid[i] == (i < m_n), $sformatf("%s: valid %0d", w, i));
      if (i < m_n)
        check(log_addr[i] == AW'(m_addr[i]) && log_syndrome[i] == m_syn[i] &&
              log_elem[i] == ELEM_W'(m_elem[i]) && log_op[i] == OP_W'(m_op[i]),
              $sformatf("%s: entry %0d", w, i));
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    compare("after reset");
    // clean reads
    for (int i = 0; i < 10; i++) do_read(i, $urandom, '0, 1, 0);
    compare("clean");
    // a rdata mismatch without a read issue must not count
    @(negedge clk); rdata = ~rd_expected; @(negedge clk);
    compare("no issue");
    // failures, one merged
    do_read(7, $urandom, 32'h0000_0010, 1, 0);
    do_read(8, $urandom, '0, 1, 0);
    do_read(7, $urandom, 32'h8000_0000, 2, 1);
    do_read(3, $urandom, 32'h0000_0003, 2, 0);
    compare("two addresses");
    do_read(9, $urandom, 32'h0100_0000, 2, 0);
    do_read(11, $urandom, 32'h0000_0100, 2, 0);
    compare("full");
    do_read(12, $urandom, 32'h0000_0001, 2, 0);   // overflow
    do_read(3, $urandom, 32'h0000_0004, 2, 1);    // still merges
    compare("overflow");
    // random traffic
    for (int r = 0; r < 200; r++) begin
      automatic int a = $urandom_range(0, 2**AW - 1);
      automatic logic [DW-1:0] f = ($urandom_range(0, 9) == 0) ? (DW'(1) << $urandom_range(0, DW - 1)) : '0;
      do_read(a, $urandom, f, $urandom_range(0, 2), $urandom_range(0, 2));
    end
    compare("random");
    // clear
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    ref_clear();
    compare("cleared");
    do_read(5, $urandom, 32'h0000_0040, 1, 1);
    compare("after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
