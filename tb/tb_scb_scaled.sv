// tb_scb_scaled: the self-compacting buffer at a larger size than its default (8 channels,
// 24 rows, 16-bit data), driven with random traffic against one FIFO model per channel.
// Checks acceptance, full, per-channel counts, read data with its one-cycle latency and the
// channel order of the CAM rows, and requires that combined accesses in both directions,
// refused writes and writes taken while full all occur.
module tb_scb_scaled;
  localparam int NCH = 8, ROWS = 24, DW = 16;
  localparam int CAP = ROWS - NCH;
  localparam int CHW = $clog2(NCH), CNTW = $clog2(ROWS + 1);

  logic clk = 0, rst_n;
  logic wr_en, rd_en, wr_ok, rd_ok, rd_valid, full;
  logic [CHW-1:0] wr_ch, rd_ch;
  logic [DW-1:0] wr_data, rd_data;
  logic [CNTW-1:0] ch_count [NCH];

  scb #(.NUM_CH(NCH), .ROWS(ROWS), .DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [DW-1:0] q [NCH][$];
  int n_above, n_below, n_refused, n_swap;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cycle(input logic ren, input int rc, input logic wen, input int wc, input logic [DW-1:0] d);
    int total, r, w;
    logic xr, xw, pend;
    logic [DW-1:0] pd;
    total = 0;
    for (int c = 0; c < NCH; c++) total += q[c].size();
    rd_en = ren; rd_ch = CHW'(rc); wr_en = wen; wr_ch = CHW'(wc); wr_data = d;
    #1;
    xr = ren && q[rc].size() > 0;
    xw = wen && (total < CAP || xr);
    chk(rd_ok === xr, "rd_ok");
    chk(wr_ok === xw, "wr_ok");
    chk(full === (total == CAP), "full");
    for (int c = 0; c < NCH; c++) chk(int'(ch_count[c]) == q[c].size(), $sformatf("ch_count[%0d]", c));
    r = 0; w = 0;
    for (int c = 0; c < rc; c++) r += q[c].size() + 1;
    for (int c = 0; c <= wc; c++) w += q[c].size() + (c < wc ? 1 : 0);
    if (xr && xw && w < r) n_above++;
    if (xr && xw && w > r) n_below++;
    if (wen && !xw) n_refused++;
    if (xw && xr && total == CAP) n_swap++;
    pend = xr; pd = '0;
    if (xr) pd = q[rc].pop_front();
    if (xw) q[wc].push_back(d);
    @(posedge clk); #1;
    chk(rd_valid === pend, "rd_valid");
    if (pend) chk(rd_data === pd, $sformatf("rd_data %h expected %h", rd_data, pd));
    for (int k = 1; k < ROWS; k++) chk(dut.u_cam.code[k] >= dut.u_cam.code[k-1], "channel order");
  endtask

  initial begin
    rd_en = 0; wr_en = 0; rd_ch = 0; wr_ch = 0; wr_data = 0;
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      // phases of write-heavy and read-heavy traffic so that the buffer fills and drains
      bit heavy_w;
      heavy_w = ((i / 500) % 2) == 0;
      cycle(($urandom % 4) < (heavy_w ? 1 : 3), $urandom % NCH,
            ($urandom % 4) < (heavy_w ? 3 : 1), $urandom % NCH, DW'($urandom));
    end
    $display("combined write above read %0d, below %0d, refused writes %0d, writes taken while full %0d",
             n_above, n_below, n_refused, n_swap);
    chk(n_above > 0 && n_below > 0 && n_refused > 0 && n_swap > 0, "a mechanism never occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
