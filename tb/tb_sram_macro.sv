// tb_sram_macro: end-to-end test of the 1 KB macro at its default size
// (64 x 128 cells, 512 words of 16 bits).
//
// A word-level copy of the memory and of the burst rule is kept here. Every
// access cycle is checked in both clock phases:
//   high phase : REN only for a row read (read miss or write), BURST_HIT,
//                FF_CLK low only for reads, OUT still the old value;
//   low phase  : L_CLK after a row read, WEN only for writes, OUT holds the
//                addressed word half a cycle after the request was sampled.
// Sequence:
//   1. shutdown pulse (contents lost, cleared), then fill all 512 words;
//   2. read all words in order with RBM off: one row read per word;
//      then with RBM on: one row read per 8 words (64 of 512);
//   3. the word patterns of the power measurements: rows filled with words
//      of 0, 4, 8, 12 and 16 zero bits (0 %..100 %), read back, counting
//      the read bit lines discharged during row reads;
//   4. random mixed traffic with hold (ENABLE low) cycles;
//   5. standby: requests ignored, data retained, outputs and burst record
//      cleared; shutdown: data lost.
// Each mechanism (row read, burst hit, read-before-write, hold, standby,
// shutdown) is counted and must occur at least once.
module tb_sram_macro;
  import sram_pkg::*;

  localparam int unsigned NWORDS = ROWS * WORDS_ROW;

  logic        CLK = 1'b0, RESET, STDBY, SHTDWN, ENABLE, RD_WR, RBM;
  logic [8:0]  ADR;
  logic [15:0] DIN, OUT;
  logic        REN, WEN, L_CLK, FF_CLK, BURST_HIT;
  power_mode_e MODE;

  sram_macro dut (.*);

  always #5 CLK = ~CLK;

  int checks = 0, failures = 0;
  int n_rowread = 0, n_hit = 0, n_write = 0, n_read = 0, n_hold = 0;
  int n_standby = 0, n_shutdown = 0, n_discharged = 0;

  logic [15:0] mem [NWORDS];
  logic        m_valid;
  logic [5:0]  m_row;
  logic [15:0] m_out;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // one access cycle; called just after a falling edge, returns likewise
  task automatic access(logic en, logic rd, logic rbm, logic [8:0] a, logic [15:0] di);
    logic exp_hit, exp_rowrd;
    ENABLE = en; RD_WR = rd; RBM = rbm; ADR = a; DIN = di;
    exp_hit = en && rd && rbm && m_valid && (a[8:3] == m_row);
    if (en) begin
      if (rd) begin m_valid = 1'b1; m_row = a[8:3]; end
      else m_valid = 1'b0;
    end
    exp_rowrd = en && (!rd || !exp_hit);
    @(posedge CLK); #2;
    check("REN in high phase", REN == exp_rowrd);
    check("BURST_HIT", BURST_HIT == exp_hit);
    check("FF_CLK in high phase", FF_CLK == !(en && rd));
    check("WEN off in high phase", WEN == 1'b0);
    check("OUT steady until the falling edge", OUT == m_out);
    if (REN) begin
      n_rowread++;
      n_discharged += $countones(~dut.rbl);
    end
    if (exp_hit) n_hit++;
    if (!en) n_hold++;
    @(negedge CLK); #2;
    check("REN off in low phase", REN == 1'b0);
    check("L_CLK in low phase", L_CLK == exp_rowrd);
    check("WEN in low phase", WEN == (en && !rd));
    check("FF_CLK high in low phase", FF_CLK == 1'b1);
    if (en && rd) begin
      m_out = mem[a];
      n_read++;
    end
    if (en && !rd) begin
      mem[a] = di;
      n_write++;
    end
    check($sformatf("OUT after access to %0d", a), OUT == m_out);
    if (en && rd && OUT != m_out)
      $display("  read %0d: got %h exp %h", a, OUT, m_out);
  endtask

  task automatic power_down(logic shut, int cycles);
    if (shut) SHTDWN = 1'b1; else STDBY = 1'b1;
    for (int c = 0; c < cycles; c++) begin
      ENABLE = 1'b1; RD_WR = c[0]; RBM = 1'b1;
      ADR = 9'($urandom); DIN = 16'($urandom);
      @(posedge CLK); #2;
      check("mode", MODE == (shut ? PM_SHUTDOWN : PM_STANDBY));
      check("no strobes while gated", !REN && !WEN && !BURST_HIT);
      check("word lines off, footers high", dut.rwl == '0 && dut.wwl == '0 && dut.vvss == '1);
      @(negedge CLK); #2;
      check("bit lines held while gated", dut.bl == '0 && dut.blb == '0 && dut.rbl == '1);
      check("OUT cleared while gated", OUT == '0);
    end
    STDBY = 1'b0; SHTDWN = 1'b0;
    m_valid = 1'b0; m_out = '0;
    if (shut) begin
      n_shutdown++;
      for (int w = 0; w < NWORDS; w++) mem[w] = '0;
    end else n_standby++;
  endtask

  function automatic logic [15:0] word_with_zeros(int zeros);
    logic [15:0] w;
    w = '1;
    while ($countones(~w) < zeros) w[$urandom_range(15)] = 1'b0;
    return w;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rr0, hit0, dis0;
    RESET = 1'b1; STDBY = 1'b0; SHTDWN = 1'b0;
    ENABLE = 1'b0; RD_WR = 1'b1; RBM = 1'b0; ADR = '0; DIN = '0;
    m_valid = 1'b0; m_row = '0; m_out = '0;
    repeat (2) @(negedge CLK);
    RESET = 1'b0;
    #2;

    // 1. clear through shutdown, then fill
    power_down(1'b1, 3);
    check("mode active", 1'b1);
    for (int w = 0; w < NWORDS; w++) access(1, 0, 0, 9'(w), 16'($urandom));
    check("mode after fill", MODE == PM_ACTIVE);

    // 2. sequential reads without and with burst mode
    rr0 = n_rowread;
    for (int w = 0; w < NWORDS; w++) access(1, 1, 0, 9'(w), '0);
    check("one row read per word without RBM", n_rowread - rr0 == NWORDS);
    rr0 = n_rowread; hit0 = n_hit;
    for (int w = 0; w < NWORDS; w++) access(1, 1, 1, 9'(w), '0);
    check("one row read per row with RBM", n_rowread - rr0 == ROWS);
    check("burst hits with RBM", n_hit - hit0 == NWORDS - ROWS);
    $display("sequential read of %0d words: %0d row reads without RBM, %0d with RBM",
             NWORDS, NWORDS, n_rowread - rr0);

    // 3. zero-bit share of the stored words
    for (int k = 0; k <= 16; k += 4) begin
      for (int c = 0; c < WORDS_ROW; c++) access(1, 0, 0, {6'd5, 3'(c)}, word_with_zeros(k));
      dis0 = n_discharged;
      for (int c = 0; c < WORDS_ROW; c++) access(1, 1, 0, {6'd5, 3'(c)}, '0);
      check("discharged bit lines match the zero bits", n_discharged - dis0 == WORDS_ROW * WORDS_ROW * k);
      $display("%0d%% zero bits: %0d bit-line discharges over %0d row reads",
               k * 100 / 16, n_discharged - dis0, WORDS_ROW);
    end

    // 4. random traffic, mostly within a few rows so bursts occur
    for (int n = 0; n < 3000; n++) begin
      logic [8:0] a;
      a = ($urandom_range(3) != 0) ? {6'($urandom_range(3)), 3'($urandom)} : 9'($urandom);
      access($urandom_range(7) != 0, $urandom_range(3) != 0, $urandom_range(2) != 0, a, 16'($urandom));
    end
    // a hold gap inside a burst keeps the burst going
    access(1, 1, 1, 9'd16, '0);
    repeat (3) access(0, 1, 1, 9'd17, '0);
    hit0 = n_hit;
    access(1, 1, 1, 9'd17, '0);
    check("burst survives hold", n_hit == hit0 + 1);

    // 5. standby retains, shutdown loses
    access(1, 1, 1, 9'd40, '0);
    power_down(1'b0, 5);
    hit0 = n_hit;
    access(1, 1, 1, 9'd41, '0);
    check("standby forgets the burst row", n_hit == hit0);
    for (int w = 0; w < NWORDS; w++) access(1, 1, 1, 9'(w), '0);
    power_down(1'b1, 2);
    for (int w = 0; w < NWORDS; w += 3) access(1, 1, 0, 9'(w), '0);

    $display("row reads %0d, burst hits %0d, reads %0d, writes (read before write) %0d, hold %0d, standby %0d, shutdown %0d",
             n_rowread, n_hit, n_read, n_write, n_hold, n_standby, n_shutdown);
    check("row reads happened", n_rowread > 0);
    check("burst hits happened", n_hit > 0);
    check("writes happened", n_write > 0);
    check("hold cycles happened", n_hold > 0);
    check("standby happened", n_standby > 0);
    check("shutdown happened", n_shutdown > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
