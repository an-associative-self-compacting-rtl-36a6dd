// scb: self-compacting buffer (SCB), the input buffer of one switch port organised as a
// dynamically allocated multi-queue (DAMQ).
//
// One buffer of ROWS rows is shared by NUM_CH output channels. Each channel owns a contiguous
// region, the regions lie in channel order (lower channel = lower rows), and each region is a
// FIFO whose oldest entry is its first row. The space a channel uses grows and shrinks with its
// traffic: a write inserts a row at the end of its channel's region and pushes everything below
// down by one row; a read takes the first row of its channel's region and pulls everything
// below up by one row. Free space is always one block at the bottom.
//
// Structure: scb_channel_pointers (a CAM holding, per row, the channel code and the F/E
// flags, and producing the read/write/shift_up/shift_down match lines), scb_controller (the
// buffer/pointer controller, which turns the match lines into the actual S_up/S_down and row
// write/read signals) and scb_data_buffer (the data rows, which move in step with the CAM rows).
//
// Interface:
//   wr_en, wr_ch, wr_data -> wr_ok   write wr_data into channel wr_ch's FIFO; wr_ok is
//                                    combinational and says the write is taken this cycle
//   rd_en, rd_ch          -> rd_ok   read the oldest entry of channel rd_ch; rd_ok says the
//                                    read is taken (the channel holds data)
//   rd_valid, rd_data                the data of a taken read, registered: one cycle after it
//   full                             no free row (a write is then taken only with a read)
//   ch_count[i]                      entries held for channel i (delta_i of the design)
// A read, a write or both are done in every cycle. Channel numbers are binary at the ports
// and turned into the CAM's thermometer code here. rst_n is synchronous and active low.
//
// The organisation, the per-channel FIFO regions and one access of each kind per cycle follow
// the described design; the port handshake, the registered read data and the full rule are
// this design's choices.
module scb #(
  parameter int unsigned NUM_CH = scb_pkg::DEF_NUM_CH,
  parameter int unsigned ROWS   = scb_pkg::DEF_ROWS,
  parameter int unsigned DATA_W = scb_pkg::DEF_DATA_W,
  localparam int unsigned CHW   = (NUM_CH > 1) ? $clog2(NUM_CH) : 1,
  localparam int unsigned CNTW  = $clog2(ROWS + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_en,
  input  logic [CHW-1:0]    wr_ch,
  input  logic [DATA_W-1:0] wr_data,
  output logic              wr_ok,
  input  logic              rd_en,
  input  logic [CHW-1:0]    rd_ch,
  output logic              rd_ok,
  output logic              rd_valid,
  output logic [DATA_W-1:0] rd_data,
  output logic              full,
  output logic [CNTW-1:0]   ch_count [NUM_CH]
);

  localparam int unsigned CW = scb_pkg::code_w(NUM_CH);

  logic [CW-1:0]   rd_key, wr_key;
  logic [ROWS-1:0] read_line, shift_up_line, write_line, shift_down_line, f, e;
  logic [ROWS-1:0] rd_row, wr_row, s_down, s_up, f_set, f_clr, e_set;
  logic            refill;
  logic [CW-1:0]   code [ROWS];
  logic [DATA_W-1:0] rbus;

  assign rd_key = CW'(scb_pkg::therm(32'(rd_ch)));
  assign wr_key = CW'(scb_pkg::therm(32'(wr_ch)));

  scb_channel_pointers #(.NUM_CH(NUM_CH), .ROWS(ROWS)) u_cam (
    .clk, .rst_n, .rd_key, .wr_key, .s_down, .s_up, .refill,
    .f_set, .f_clr, .e_set,
    .read_line, .shift_up_line, .write_line, .shift_down_line, .f, .e, .code
  );

  // Reset holds the controller idle so the CAM can load its initial rows.
  scb_controller #(.NUM_CH(NUM_CH), .ROWS(ROWS)) u_ctrl (
    .rd_en(rd_en & rst_n), .wr_en(wr_en & rst_n),
    .read_line, .shift_up_line, .write_line, .shift_down_line, .f, .e,
    .rd_ok, .wr_ok, .full, .rd_row, .wr_row, .s_down, .s_up, .refill,
    .f_set, .f_clr, .e_set
  );

  scb_data_buffer #(.ROWS(ROWS), .DATA_W(DATA_W)) u_buf (
    .clk, .wr_row, .rd_row, .s_down, .s_up, .wdata(wr_data), .rdata(rbus), .row_q()
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_valid <= 1'b0;
      rd_data  <= '0;
    end else begin
      rd_valid <= rd_ok;
      if (rd_ok) rd_data <= rbus;
    end
  end

  // delta_i: rows of channel i that hold data.
  always_comb begin
    for (int i = 0; i < NUM_CH; i++) begin
      ch_count[i] = '0;
      for (int k = 0; k < ROWS; k++)
        ch_count[i] += CNTW'(e[k] && (code[k] == CW'(scb_pkg::therm(i))));
    end
  end

  // Access rules: channel numbers in range, at most one row read and one row written.
  a_wr_ch: assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> (32'(wr_ch) < NUM_CH));
  a_rd_ch: assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> (32'(rd_ch) < NUM_CH));
  a_rows:  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(rd_row) && $onehot0(wr_row));

endmodule
