// tb_scb_controller: drives the buffer/pointer controller with the match lines and F/E fields
// of legal buffer states, built from per-channel entry counts. Checks
//  - the S_down / S_up link vectors, the written row and the refill against the row ranges
//    worked out from the positions of the read row r and the write row w
//    (write only: rows w+1.. move down; read only: rows r+1.. move up;
//     w < r: rows w+1..r move down; w > r: rows r+1..w move up and data goes to row w-1);
//  - the row state after applying all outputs against the state rebuilt from the new counts;
//  - the four cycles of the worked example (see README), whose S_down/S_up values are listed with
//    row 0 as the most significant bit and S_up active low: 7f, 1f, 20 and S_up 80.
module tb_scb_controller;
  localparam int NCH = 4, ROWS = 8, CAP = ROWS - NCH;
  logic rd_en, wr_en;
  logic [ROWS-1:0] read_line, shift_up_line, write_line, shift_down_line, f, e;
  logic rd_ok, wr_ok, full, refill;
  logic [ROWS-1:0] rd_row, wr_row, s_down, s_up, f_set, f_clr, e_set;
  int cnt [NCH];
  int rch [ROWS];
  logic rf [ROWS], re [ROWS];
  int checks = 0, failures = 0;
  logic clk = 0;

  scb_controller #(.NUM_CH(NCH), .ROWS(ROWS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [ROWS-1:0] rev(input logic [ROWS-1:0] v);
    for (int i = 0; i < ROWS; i++) rev[i] = v[ROWS-1-i];
  endfunction

  // rows from counts: per channel its data rows, then its empty end row; the rest free
  task automatic build(output int ch [ROWS], output logic ff [ROWS], output logic ee [ROWS]);
    int k = 0;
    for (int c = 0; c < NCH; c++) begin
      for (int j = 0; j < cnt[c]; j++) begin ch[k] = c; ff[k] = (j == 0); ee[k] = 1; k++; end
      ch[k] = c; ff[k] = (cnt[c] == 0); ee[k] = 0; k++;
    end
    while (k < ROWS) begin ch[k] = NCH - 1; ff[k] = 1; ee[k] = 0; k++; end
  endtask

  function automatic int start_row(int c);
    int k = 0;
    for (int i = 0; i < c; i++) k += cnt[i] + 1;
    return k;
  endfunction

  task automatic step(input logic ren, input int rc, input logic wen, input int wc,
                      input bit fig, input logic [ROWS-1:0] fig_down, input logic [ROWS-1:0] fig_up_n);
    int total, r, w;
    logic exp_rd, exp_wr;
    logic [ROWS-1:0] xd, xu, xw;
    logic xrefill;
    int nch [ROWS];
    logic nf [ROWS], ne [ROWS];
    int ech [ROWS];
    logic ef [ROWS], ee [ROWS];
    build(rch, rf, re);
    for (int k = 0; k < ROWS; k++) begin
      read_line[k] = (rch[k] == rc) && rf[k]; shift_up_line[k] = (rch[k] >= rc);
      write_line[k] = (rch[k] == wc); shift_down_line[k] = (rch[k] > wc) || (rch[k] == wc && !re[k]);
      f[k] = rf[k]; e[k] = re[k];
    end
    rd_en = ren; wr_en = wen;
    #1;
    total = 0;
    for (int c = 0; c < NCH; c++) total += cnt[c];
    exp_rd = ren && cnt[rc] > 0;
    exp_wr = wen && (total < CAP || exp_rd);
    r = start_row(rc);
    w = start_row(wc) + cnt[wc];
    xd = '0; xu = '0; xw = '0; xrefill = 0;
    if (exp_wr && !exp_rd) begin
      for (int k = w + 1; k < ROWS; k++) xd[k] = 1;
      xw[w] = 1;
    end else if (exp_rd && !exp_wr) begin
      for (int k = r + 1; k < ROWS; k++) xu[k] = 1;
      xrefill = 1;
    end else if (exp_rd && exp_wr && w < r) begin
      for (int k = w + 1; k <= r; k++) xd[k] = 1;
      xw[w] = 1;
    end else if (exp_rd && exp_wr) begin
      for (int k = r + 1; k <= w; k++) xu[k] = 1;
      xw[w-1] = 1;
    end
    chk(rd_ok === exp_rd, $sformatf("rd_ok %b", rd_ok));
    chk(wr_ok === exp_wr, $sformatf("wr_ok %b", wr_ok));
    chk(full === (total == CAP), "full");
    chk(rd_row === (exp_rd ? ROWS'(1) << r : '0), $sformatf("rd_row %b r %0d", rd_row, r));
    chk(s_down === xd, $sformatf("s_down %b exp %b (w %0d r %0d)", s_down, xd, w, r));
    chk(s_up === xu, $sformatf("s_up %b exp %b (w %0d r %0d)", s_up, xu, w, r));
    chk(wr_row === xw, $sformatf("wr_row %b exp %b", wr_row, xw));
    chk(refill === xrefill, "refill");
    if (fig) begin
      chk(rev(s_down) === fig_down, $sformatf("trace S_down %h", rev(s_down)));
      chk(rev(~s_up) === fig_up_n, $sformatf("trace S_up %h", rev(~s_up)));
    end
    // apply the outputs to the rows and compare with the rows of the new counts
    for (int k = 0; k < ROWS; k++) begin
      nch[k] = rch[k]; nf[k] = rf[k]; ne[k] = re[k];
      if (k > 0 && s_down[k]) begin nch[k] = rch[k-1]; nf[k] = rf[k-1]; ne[k] = re[k-1]; end
      else if (k < ROWS-1 && s_up[k+1]) begin nch[k] = rch[k+1]; nf[k] = rf[k+1]; ne[k] = re[k+1]; end
      else if (k == ROWS-1 && refill) begin nch[k] = NCH - 1; nf[k] = 1; ne[k] = 0; end
      nf[k] = (nf[k] & ~f_clr[k]) | f_set[k];
      ne[k] = ne[k] | e_set[k];
    end
    if (exp_rd) cnt[rc]--;
    if (exp_wr) cnt[wc]++;
    build(ech, ef, ee);
    for (int k = 0; k < ROWS; k++)
      chk(nch[k] == ech[k] && nf[k] === ef[k] && ne[k] === ee[k],
          $sformatf("row %0d after update: ch %0d f %b e %b, expected ch %0d f %b e %b",
                    k, nch[k], nf[k], ne[k], ech[k], ef[k], ee[k]));
    @(posedge clk);
  endtask

  initial begin
    for (int c = 0; c < NCH; c++) cnt[c] = 0;
    // worked example of the README
    step(0, 0, 1, 0, 1, 8'h7f, 8'hff);   // cycle 1: write channel 0
    step(0, 0, 1, 1, 1, 8'h1f, 8'hff);   // cycle 2: write channel 1
    step(1, 1, 1, 0, 1, 8'h20, 8'hff);   // cycle 3: write channel 0, read channel 1
    step(1, 0, 0, 0, 1, 8'h00, 8'h80);   // cycle 4: read channel 0
    for (int i = 0; i < 3000; i++)
      step(1'($urandom), $urandom % NCH, ($urandom % 4) != 0, $urandom % NCH, 0, '0, '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
