// tb_input_latches: random requests are applied between clock edges; after
// each rising edge the latched outputs must equal the request applied before
// that edge and must not follow input changes during the high phase. Reset
// must clear the stage.
module tb_input_latches;
  logic        clk = 1'b0, rst;
  logic        enable, rd_wr, rbm, enable_q, rd_wr_q, rbm_q;
  logic [8:0]  adr, adr_q;
  logic [15:0] din, din_q;
  int checks = 0, failures = 0;

  input_latches dut (.clk, .rst, .enable, .rd_wr, .rbm, .adr, .din,
                     .enable_q, .rd_wr_q, .rbm_q, .adr_q, .din_q);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [27:0] req;
    rst = 1'b1; {enable, rd_wr, rbm, adr, din} = '0;
    @(negedge clk); rst = 1'b0;
    for (int n = 0; n < 200; n++) begin
      req = 28'({$urandom, $urandom});
      {enable, rd_wr, rbm, adr, din} = req;
      @(posedge clk); #2;
      {enable, rd_wr, rbm, adr, din} = ~req;   // must not pass through
      #2;
      checks++;
      if ({enable_q, rd_wr_q, rbm_q, adr_q, din_q} !== req) begin
        failures++;
        if (failures < 10) $display("FAIL got %h exp %h", {enable_q, rd_wr_q, rbm_q, adr_q, din_q}, req);
      end
      @(negedge clk);
    end
    rst = 1'b1; #1;
    checks++;
    if (enable_q !== 1'b0 || din_q !== '0 || adr_q !== '0) begin
      failures++; $display("FAIL reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
