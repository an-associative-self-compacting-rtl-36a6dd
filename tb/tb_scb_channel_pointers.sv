// tb_scb_channel_pointers: reset contents of the channel-pointer CAM, then random row moves
// and flag updates checked against a model of channel number, F and E per row. The match
// lines are checked against integer comparisons of the model's channel numbers and flags.
module tb_scb_channel_pointers;
  localparam int NCH = 4, ROWS = 8, CW = NCH - 1;
  logic clk = 0, rst_n;
  logic [CW-1:0] rd_key, wr_key;
  logic [ROWS-1:0] s_down, s_up, f_set, f_clr, e_set;
  logic refill;
  logic [ROWS-1:0] read_line, shift_up_line, write_line, shift_down_line, f, e;
  logic [CW-1:0] code [ROWS];
  int mch [ROWS], nch [ROWS];
  logic mf [ROWS], me [ROWS], nf [ROWS], ne [ROWS];
  int checks = 0, failures = 0;

  scb_channel_pointers #(.NUM_CH(NCH), .ROWS(ROWS)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [CW-1:0] th(int c);
    logic [CW-1:0] t;
    for (int i = 0; i < CW; i++) t[i] = (i < c);
    return t;
  endfunction

  task automatic compare(input string when);
    for (int k = 0; k < ROWS; k++) begin
      checks++;
      if (code[k] !== th(mch[k]) || f[k] !== mf[k] || e[k] !== me[k]) begin
        failures++;
        $display("%s row %0d: code %b f %b e %b, expected ch %0d f %b e %b", when, k, code[k], f[k], e[k], mch[k], mf[k], me[k]);
      end
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {s_down, s_up, f_set, f_clr, e_set, refill} = '0;
    rd_key = '0; wr_key = '0;
    rst_n = 0;
    @(posedge clk); #1;
    rst_n = 1;
    for (int k = 0; k < ROWS; k++) begin
      mch[k] = (k < NCH) ? k : NCH - 1; mf[k] = 1; me[k] = 0;
    end
    compare("reset");
    for (int i = 0; i < 1000; i++) begin
      int rc, wc;
      rc = $urandom % NCH; wc = $urandom % NCH;
      rd_key = th(rc); wr_key = th(wc);
      s_down = ROWS'($urandom); s_up = ROWS'($urandom); refill = 1'($urandom);
      f_set = ROWS'($urandom) & ROWS'($urandom); f_clr = ROWS'($urandom) & ROWS'($urandom);
      e_set = ROWS'($urandom) & ROWS'($urandom);
      #1;
      for (int k = 0; k < ROWS; k++) begin
        checks++;
        if (read_line[k] !== (mch[k] == rc && mf[k]) || write_line[k] !== (mch[k] == wc) ||
            shift_up_line[k] !== (mch[k] >= rc) ||
            shift_down_line[k] !== (mch[k] > wc || (mch[k] == wc && !me[k]))) begin
          failures++;
          $display("match lines row %0d ch %0d rc %0d wc %0d: %b%b%b%b", k, mch[k], rc, wc,
                   read_line[k], shift_up_line[k], write_line[k], shift_down_line[k]);
        end
      end
      for (int k = 0; k < ROWS; k++) begin
        nch[k] = mch[k]; nf[k] = mf[k]; ne[k] = me[k];
        if (k > 0 && s_down[k]) begin nch[k] = mch[k-1]; nf[k] = mf[k-1]; ne[k] = me[k-1]; end
        else if (k < ROWS-1 && s_up[k+1]) begin nch[k] = mch[k+1]; nf[k] = mf[k+1]; ne[k] = me[k+1]; end
        else if (k == ROWS-1 && refill) begin nch[k] = NCH - 1; nf[k] = 1; ne[k] = 0; end
        nf[k] = (nf[k] & ~f_clr[k]) | f_set[k];
        ne[k] = ne[k] | e_set[k];
      end
      @(posedge clk); #1;
      mch = nch; mf = nf; me = ne;
      compare($sformatf("cycle %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
