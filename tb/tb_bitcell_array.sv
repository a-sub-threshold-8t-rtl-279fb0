// tb_bitcell_array: writes random rows through the write port and reads them
// back through the read port, against a row-by-row copy kept here.
// Also checks: writing one row leaves the other rows unchanged;
// a row whose footer VVSS is high does not discharge RBL even with its RWL
// on; RBL reads all ones while precharged; array_on low loses the contents.
module tb_bitcell_array;
  localparam int unsigned ROWS = 64;
  localparam int unsigned COLS = 128;

  logic            array_on, rbl_pre;
  logic [ROWS-1:0] rwl, wwl, vvss;
  logic [COLS-1:0] bl, blb, rbl;
  logic [COLS-1:0] model [ROWS];
  int checks = 0, failures = 0;

  bitcell_array dut (
    .array_on, .rwl, .wwl, .vvss, .bl, .blb, .rbl_pre, .rbl
  );

  function automatic logic [COLS-1:0] rnd_row();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  task automatic write_row(int r, logic [COLS-1:0] data, logic [COLS-1:0] drive);
    bl  = data & drive;
    blb = ~data & drive;
    #1 wwl[r] = 1'b1;
    #1 wwl[r] = 1'b0;
    #1 bl = '0; blb = '0;
    for (int c = 0; c < COLS; c++) if (drive[c]) model[r][c] = data[c];
  endtask

  // read row r; 'other' is a second row whose RWL is also raised but whose
  // VVSS stays high, as an unselected row's would
  task automatic read_row(int r, int other, string what);
    rbl_pre = 1'b0;
    rwl[r] = 1'b1; vvss[r] = 1'b0;
    if (other >= 0) rwl[other] = 1'b1;
    #1;
    checks++;
    if (rbl !== model[r]) begin
      failures++;
      if (failures < 10) $display("FAIL %s row %0d: rbl=%h exp=%h", what, r, rbl, model[r]);
    end
    rwl = '0; vvss = '1; rbl_pre = 1'b1;
    #1;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    array_on = 1'b0; rbl_pre = 1'b1;
    rwl = '0; wwl = '0; vvss = '1; bl = '0; blb = '0;
    #1 array_on = 1'b1;
    for (int r = 0; r < ROWS; r++) model[r] = '0;
    #1;
    // every row, full writes
    for (int r = 0; r < ROWS; r++) write_row(r, rnd_row(), '1);
    for (int r = 0; r < ROWS; r++) read_row(r, (r + 7) % ROWS, "full");
    // single-row rewrites; the neighbour rows must keep their data
    for (int n = 0; n < 100; n++) begin
      int r;
      r = $urandom_range(ROWS - 1);
      write_row(r, rnd_row(), '1);
      read_row(r, (r + 1) % ROWS, "rewrite");
      read_row((r + 1) % ROWS, r, "neighbour");
    end
    // precharged: all ones whatever the contents
    rwl = '1; vvss = '1; rbl_pre = 1'b1;
    #1;
    checks++;
    if (rbl !== '1) begin failures++; $display("FAIL precharge"); end
    rwl = '0;
    // power gating the array loses the data
    array_on = 1'b0;
    #1 array_on = 1'b1;
    for (int r = 0; r < ROWS; r++) model[r] = '0;
    for (int r = 0; r < ROWS; r += 9) read_row(r, -1, "after shutdown");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
