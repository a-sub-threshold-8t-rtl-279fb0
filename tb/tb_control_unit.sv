// tb_control_unit: drives idle, read, burst-hit read and write cycles and
// checks every strobe in both clock phases against the cycle description:
//   high phase: REN = row read (read miss or write), FF_CLK low for reads;
//   low phase : L_CLK = row read, WEN = write, FF_CLK high;
// plus the falling-edge enables handed to the DMU. Each kind of cycle must
// occur.
module tb_control_unit;
  logic clk = 1'b0, rst;
  logic enable_q, rd_wr_q, burst_hit;
  logic ren, wen, l_clk, ff_clk, lat_en, out_en, out_from_latch;
  int checks = 0, failures = 0;
  int n_kind [4];

  control_unit dut (.clk, .rst, .enable_q, .rd_wr_q, .burst_hit,
                    .ren, .wen, .l_clk, .ff_clk, .lat_en, .out_en, .out_from_latch);

  always #5 clk = ~clk;

  task automatic check(string what, logic [6:0] got, logic [6:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %b exp %b", what, got, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; {enable_q, rd_wr_q, burst_hit} = '0;
    #12 rst = 1'b0;
    @(negedge clk);
    for (int n = 0; n < 400; n++) begin
      int kind;     // 0 idle, 1 read, 2 burst read, 3 write
      logic rd, wr, rowrd;
      kind = $urandom_range(3);
      n_kind[kind]++;
      @(posedge clk); #1;
      enable_q  = (kind != 0);
      rd_wr_q   = (kind != 3);
      burst_hit = (kind == 2);
      rd    = (kind == 1 || kind == 2);
      wr    = (kind == 3);
      rowrd = (kind == 1 || kind == 3);
      #2;   // high phase
      check("high", {ren, wen, l_clk, ff_clk, lat_en, out_en, out_from_latch},
                    {rowrd, 1'b0, 1'b0, !rd, rowrd, rd, kind == 2});
      @(negedge clk); #2;   // low phase
      check("low", {ren, wen, l_clk, ff_clk, lat_en, out_en, out_from_latch},
                   {1'b0, wr, rowrd, 1'b1, rowrd, rd, kind == 2});
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (n_kind[k] == 0) begin failures++; $display("FAIL cycle kind %0d never ran", k); end
    end
    $display("cycles idle/read/burst/write: %0d %0d %0d %0d", n_kind[0], n_kind[1], n_kind[2], n_kind[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
