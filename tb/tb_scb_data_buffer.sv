// tb_scb_data_buffer: random per-row write, read and shift controls on the data buffer,
// checked against an array model. One row at most reads in a cycle; rows write, shift down
// from row k-1 (s_down[k]) or up from row k+1 (s_up[k+1]), with write first.
module tb_scb_data_buffer;
  localparam int ROWS = 8, DW = 4;
  logic clk = 0;
  logic [ROWS-1:0] wr_row, rd_row, s_down, s_up;
  logic [DW-1:0] wdata, rdata;
  logic [DW-1:0] row_q [ROWS];
  logic [DW-1:0] m [ROWS], mn [ROWS];
  int checks = 0, failures = 0;

  scb_data_buffer #(.ROWS(ROWS), .DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every row through the write bus
    s_down = '0; s_up = '0; rd_row = '0;
    for (int k = 0; k < ROWS; k++) begin
      wr_row = ROWS'(1) << k; wdata = DW'(k + 3);
      @(posedge clk); #1; m[k] = DW'(k + 3);
    end
    for (int i = 0; i < 1000; i++) begin
      wr_row = (i % 3 == 0) ? (ROWS'(1) << ($urandom % ROWS)) : '0;
      rd_row = (i % 2 == 0) ? (ROWS'(1) << ($urandom % ROWS)) : '0;
      s_down = ROWS'($urandom); s_up = ROWS'($urandom);
      wdata = DW'($urandom);
      #1;
      checks++;
      begin
        logic [DW-1:0] exp;
        exp = '0;
        for (int k = 0; k < ROWS; k++) if (rd_row[k]) exp = m[k];
        if (rdata !== exp) begin failures++; $display("read bus %h exp %h", rdata, exp); end
      end
      for (int k = 0; k < ROWS; k++) begin
        mn[k] = m[k];
        if (wr_row[k]) mn[k] = wdata;
        else if (k > 0 && s_down[k]) mn[k] = m[k-1];
        else if (k < ROWS-1 && s_up[k+1]) mn[k] = m[k+1];
      end
      @(posedge clk); #1;
      m = mn;
      for (int k = 0; k < ROWS; k++) begin
        checks++;
        if (row_q[k] !== m[k]) begin failures++; $display("cycle %0d row %0d: %h exp %h", i, k, row_q[k], m[k]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
