// tb_scb: end-to-end test of the self-compacting buffer at its default size (8 rows,
// 4 channels, 4-bit data).
//  1. Replays the four-cycle worked example of the README (write ch0 0000; write ch1 1010; write ch0
//     1111 with read ch1; read ch0) and checks every CAM row word {channel code, F, E}, the
//     data rows, the read data and the read/shift_up/write/shift_down match lines of the
//     accesses against the values given for it.
//  2. Runs random traffic against one FIFO model per channel: checks acceptance, full, the
//     per-channel counts, the read data and its one-cycle latency, and that the channel
//     regions stay in channel order (lower channel in lower rows).
// Each mechanism is counted: write alone, read alone, read+write with the write row above
// and below the read row, a write refused when full, a write taken when full thanks to a
// read, a read of an empty channel; a mechanism that never happened counts as a failure.
module tb_scb;
  localparam int NCH = scb_pkg::DEF_NUM_CH, ROWS = scb_pkg::DEF_ROWS, DW = scb_pkg::DEF_DATA_W;
  localparam int CAP = ROWS - NCH;
  localparam int CNTW = $clog2(ROWS + 1);

  logic clk = 0, rst_n;
  logic wr_en, rd_en, wr_ok, rd_ok, rd_valid, full;
  logic [1:0] wr_ch, rd_ch;
  logic [DW-1:0] wr_data, rd_data;
  logic [CNTW-1:0] ch_count [NCH];

  scb dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [DW-1:0] q [NCH][$];
  int n_wr_only, n_rd_only, n_w_above_r, n_w_below_r, n_full_refused, n_full_swap, n_empty_read;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [4:0] row_word(int k);
    return {dut.u_cam.code[k], dut.u_cam.f[k], dut.u_cam.e[k]};
  endfunction

  function automatic logic [ROWS-1:0] rev(input logic [ROWS-1:0] v);
    for (int i = 0; i < ROWS; i++) rev[i] = v[ROWS-1-i];
  endfunction

  // match lines as listed in the worked example (row 0 = most significant bit), before the edge
  task automatic check_lines(input logic [ROWS-1:0] rd_l, input logic [ROWS-1:0] su_l,
                             input logic [ROWS-1:0] wr_l, input logic [ROWS-1:0] sd_l,
                             input logic [3:0] which, input string when);
    if (which[3]) chk(rev(dut.u_cam.read_line) === rd_l, $sformatf("%s read line %h, trace %h", when, rev(dut.u_cam.read_line), rd_l));
    if (which[2]) chk(rev(dut.u_cam.shift_up_line) === su_l, $sformatf("%s shift_up line %h, trace %h", when, rev(dut.u_cam.shift_up_line), su_l));
    if (which[1]) chk(rev(dut.u_cam.write_line) === wr_l, $sformatf("%s write line %h, trace %h", when, rev(dut.u_cam.write_line), wr_l));
    if (which[0]) chk(rev(dut.u_cam.shift_down_line) === sd_l, $sformatf("%s shift_down line %h, trace %h", when, rev(dut.u_cam.shift_down_line), sd_l));
  endtask

  task automatic check_rows(input logic [4:0] exp [ROWS], input string when);
    for (int k = 0; k < ROWS; k++)
      chk(row_word(k) === exp[k], $sformatf("%s CAM_row%0d = %h, expected %h", when, k, row_word(k), exp[k]));
  endtask

  // one cycle: present the request, check acceptance, clock, then check the read result
  logic pend;
  logic [DW-1:0] pend_data;
  logic       tr_on;
  logic [3:0] tr_which;
  logic [ROWS-1:0] tr_rd, tr_su, tr_wr, tr_sd;
  task automatic cycle(input logic ren, input int rc, input logic wen, input int wc, input logic [DW-1:0] d);
    int total;
    logic xr, xw;
    int r, w;
    total = 0;
    for (int c = 0; c < NCH; c++) total += q[c].size();
    rd_en = ren; rd_ch = 2'(rc); wr_en = wen; wr_ch = 2'(wc); wr_data = d;
    #1;
    if (tr_on) check_lines(tr_rd, tr_su, tr_wr, tr_sd, tr_which, "trace");
    xr = ren && q[rc].size() > 0;
    xw = wen && (total < CAP || xr);
    chk(rd_ok === xr, $sformatf("rd_ok %b expected %b", rd_ok, xr));
    chk(wr_ok === xw, $sformatf("wr_ok %b expected %b", wr_ok, xw));
    chk(full === (total == CAP), $sformatf("full %b with %0d entries", full, total));
    for (int c = 0; c < NCH; c++)
      chk(int'(ch_count[c]) == q[c].size(), $sformatf("ch_count[%0d] %0d expected %0d", c, ch_count[c], q[c].size()));
    // classify the access: rows of the read top and the write end row
    r = 0; w = 0;
    for (int c = 0; c < rc; c++) r += q[c].size() + 1;
    for (int c = 0; c <= wc; c++) w += q[c].size() + (c < wc ? 1 : 0);
    if (xw && !xr) n_wr_only++;
    if (xr && !xw) n_rd_only++;
    if (xr && xw && w < r) n_w_above_r++;
    if (xr && xw && w > r) n_w_below_r++;
    if (wen && !xw) n_full_refused++;
    if (xw && xr && total == CAP) n_full_swap++;
    if (ren && q[rc].size() == 0) n_empty_read++;
    pend = xr;
    if (xr) pend_data = q[rc].pop_front();
    if (xw) q[wc].push_back(d);
    @(posedge clk); #1;
    chk(rd_valid === pend, $sformatf("rd_valid %b one cycle after a read expected %b", rd_valid, pend));
    if (pend) chk(rd_data === pend_data, $sformatf("rd_data %h expected %h", rd_data, pend_data));
    // Property 1: regions in channel order
    for (int k = 1; k < ROWS; k++)
      chk(dut.u_cam.code[k] >= dut.u_cam.code[k-1], $sformatf("row %0d channel below row %0d's", k, k-1));
  endtask

  initial begin
    logic [4:0] exp [ROWS];
    rd_en = 0; wr_en = 0; rd_ch = 0; wr_ch = 0; wr_data = 0;
    tr_on = 0; tr_which = 0; tr_rd = 0; tr_su = 0; tr_wr = 0; tr_sd = 0;
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    exp = '{5'h02, 5'h06, 5'h0e, 5'h1e, 5'h1e, 5'h1e, 5'h1e, 5'h1e};
    check_rows(exp, "after reset");
    // the worked example (see README); match lines are checked only for the accesses that take place
    tr_on = 1;
    tr_which = 4'b0011; tr_wr = 8'h80; tr_sd = 8'hff;
    cycle(0, 0, 1, 0, 4'b0000);
    exp = '{5'h03, 5'h00, 5'h06, 5'h0e, 5'h1e, 5'h1e, 5'h1e, 5'h1e};
    check_rows(exp, "cycle 1");
    chk(dut.u_buf.row_q[0] === 4'b0000, "cycle 1 BUFFER_row0");
    tr_which = 4'b0011; tr_wr = 8'h20; tr_sd = 8'h3f;
    cycle(0, 0, 1, 1, 4'b1010);
    exp = '{5'h03, 5'h00, 5'h07, 5'h04, 5'h0e, 5'h1e, 5'h1e, 5'h1e};
    check_rows(exp, "cycle 2");
    chk(dut.u_buf.row_q[2] === 4'b1010, "cycle 2 BUFFER_row2");
    tr_which = 4'b1111; tr_rd = 8'h20; tr_su = 8'h3f; tr_wr = 8'hc0; tr_sd = 8'h7f;
    cycle(1, 1, 1, 0, 4'b1111);
    exp = '{5'h03, 5'h01, 5'h00, 5'h06, 5'h0e, 5'h1e, 5'h1e, 5'h1e};
    check_rows(exp, "cycle 3");
    chk(dut.u_buf.row_q[1] === 4'b1111, "cycle 3 BUFFER_row1");
    chk(rd_data === 4'b1010, "cycle 3 read_bus");
    tr_which = 4'b1100; tr_rd = 8'h80; tr_su = 8'hff;
    cycle(1, 0, 0, 0, 4'b0000);
    tr_on = 0;
    exp = '{5'h03, 5'h00, 5'h06, 5'h0e, 5'h1e, 5'h1e, 5'h1e, 5'h1e};
    check_rows(exp, "cycle 4");
    chk(dut.u_buf.row_q[0] === 4'b1111, "cycle 4 BUFFER_row0");
    chk(rd_data === 4'b0000, "cycle 4 read_bus");
    // fill to full, try one more write, then a write with a read while full
    for (int i = 0; i < CAP + 1; i++) cycle(0, 0, 1, i % NCH, DW'(i));
    cycle(1, 0, 1, 3, 4'h9);
    // random traffic
    for (int i = 0; i < 20000; i++)
      cycle(($urandom % 3) != 0, $urandom % NCH, ($urandom % 3) != 0, $urandom % NCH, DW'($urandom));
    // drain
    for (int c = 0; c < NCH; c++) while (q[c].size() > 0) cycle(1, c, 0, 0, '0);
    cycle(0, 0, 0, 0, '0);
    exp = '{5'h02, 5'h06, 5'h0e, 5'h1e, 5'h1e, 5'h1e, 5'h1e, 5'h1e};
    check_rows(exp, "drained");
    $display("write only %0d, read only %0d, read+write with write above %0d / below %0d",
             n_wr_only, n_rd_only, n_w_above_r, n_w_below_r);
    $display("write refused when full %0d, write taken when full with a read %0d, read of empty channel %0d",
             n_full_refused, n_full_swap, n_empty_read);
    chk(n_wr_only > 0, "no write-only cycle");
    chk(n_rd_only > 0, "no read-only cycle");
    chk(n_w_above_r > 0, "no combined access with the write above the read");
    chk(n_w_below_r > 0, "no combined access with the write below the read");
    chk(n_full_refused > 0, "no refused write");
    chk(n_full_swap > 0, "no write taken while full");
    chk(n_empty_read > 0, "no read of an empty channel");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
