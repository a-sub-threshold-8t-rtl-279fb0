// tb_dmu: random row reads, burst reads and writes through the DMU, with
// the latches and output register mirrored here. After each falling edge it
// checks the output word (from the bit lines for a row read, from the
// latches for a burst read, unchanged for a write) and the merged write row
// d (latched row with the addressed word replaced by DIN).
module tb_dmu;
  localparam int unsigned COLS = 128, W = 16;
  logic            clk = 1'b0, rst;
  logic [COLS-1:0] rbl, d;
  logic [W-1:0]    din, dout;
  logic [2:0]      col;
  logic            lat_en, out_en, out_from_latch;
  int checks = 0, failures = 0;

  dmu dut (.clk, .rst, .rbl, .din, .col, .lat_en, .out_en, .out_from_latch, .dout, .d);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [COLS-1:0] m_lat, m_d;
    logic [W-1:0]    m_out;
    rst = 1'b1; rbl = '1; din = '0; col = '0;
    {lat_en, out_en, out_from_latch} = '0;
    m_lat = '0; m_out = '0;
    #12 rst = 1'b0;
    for (int n = 0; n < 500; n++) begin
      int kind;   // 0 row read, 1 burst read, 2 write, 3 idle
      kind = $urandom_range(3);
      @(posedge clk); #1;
      rbl = {$urandom, $urandom, $urandom, $urandom};
      din = W'($urandom);
      col = 3'($urandom);
      lat_en         = (kind == 0 || kind == 2);
      out_en         = (kind == 0 || kind == 1);
      out_from_latch = (kind == 1);
      if (lat_en) m_lat = rbl;
      if (kind == 0) m_out = rbl[col*W +: W];
      if (kind == 1) m_out = m_lat[col*W +: W];
      m_d = m_lat;
      m_d[col*W +: W] = din;
      @(negedge clk); #1;
      rbl = '1;   // precharged again
      #1;
      checks++;
      if (dout !== m_out) begin
        failures++;
        if (failures < 10) $display("FAIL kind %0d dout=%h exp=%h", kind, dout, m_out);
      end
      checks++;
      if (d !== m_d) begin
        failures++;
        if (failures < 10) $display("FAIL kind %0d d=%h exp=%h", kind, d, m_d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
