// tb_burst_control_unit: random latched-request streams biased towards
// repeated rows, against a reference kept here: a hit needs ENABLE, a read,
// RBM, and the previous enabled access to have been a read of the same row;
// a write or a reset forgets the row; idle cycles keep it. Hits and misses
// are counted and both must occur.
module tb_burst_control_unit;
  logic       clk = 1'b0, rst;
  logic       enable_q, rd_wr_q, rbm_q, burst_hit;
  logic [5:0] row_q;
  int checks = 0, failures = 0, hits = 0;

  burst_control_unit dut (.clk, .rst, .enable_q, .rd_wr_q, .rbm_q, .row_q, .burst_hit);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic       m_valid, exp;
    logic [5:0] m_row;
    rst = 1'b1; {enable_q, rd_wr_q, rbm_q, row_q} = '0;
    m_valid = 1'b0; m_row = '0;
    @(posedge clk); #1 rst = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      enable_q = ($urandom_range(9) != 0);
      rd_wr_q  = ($urandom_range(5) != 0);
      rbm_q    = ($urandom_range(7) != 0);
      row_q    = ($urandom_range(2) != 0) ? m_row : 6'($urandom_range(3));
      rst      = (n == 1000);
      if (rst) m_valid = 1'b0;
      exp = enable_q && rd_wr_q && rbm_q && m_valid && (row_q == m_row);
      #2;
      checks++;
      if (burst_hit) hits++;
      if (burst_hit !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d hit=%0d exp=%0d", n, burst_hit, exp);
      end
      if (!rst && enable_q) begin
        m_valid = rd_wr_q;
        m_row   = row_q;
      end
      @(posedge clk); #1;
    end
    checks++;
    if (hits == 0 || hits == checks - 1) begin
      failures++; $display("FAIL hits=%0d of %0d", hits, checks - 1);
    end
    $display("burst hits: %0d", hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
