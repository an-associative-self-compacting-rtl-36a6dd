// scb_channel_pointers: the channel-pointer CAM of the self-compacting buffer.
//
// Each of the ROWS rows describes the data row beside it: the thermometer code of the output
// channel the row belongs to, F (1 = the first row of its channel's region) and E (1 = the row
// holds data, 0 = the empty row that ends the region). Every channel always owns at least its
// empty end row, so an empty channel is one row with F=1, E=0. Rows after the last channel's
// end row are free space; they carry the last channel's code with F=1, E=0.
//
// Match lines (combinational, one bit per row), named as in the described CAM:
//   read_line        row channel == read channel and F=1   (first row of the read channel)
//   shift_up_line    row channel >= read channel
//   write_line       row channel == write channel
//   shift_down_line  row channel >= write channel, except the data rows (E=1) of the write
//                    channel itself: the rows from the write channel's end row downward
// The rows move together with the data rows: s_down[k] loads row k from row k-1, s_up[k+1]
// loads row k from row k+1, and refill loads the last row with a free row. After the move,
// f_set/f_clr adjust F (set wins) and e_set marks a newly written row full.
// Reset (synchronous, active low) gives channel c its empty row at row c and makes the rest
// free space.
// Timing: one update per clock edge.
//
// Fields, flag meanings and reset loading follow the described channel pointers; the
// thermometer coding and the F/E terms of the read and shift_down lines are read from the
// row and match-line values of the worked example (see README); the free-row
// encoding and the flag update signals are this design's choices.
module scb_channel_pointers #(
  parameter int unsigned NUM_CH = scb_pkg::DEF_NUM_CH,
  parameter int unsigned ROWS   = scb_pkg::DEF_ROWS,
  localparam int unsigned CW    = scb_pkg::code_w(NUM_CH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [CW-1:0] rd_key,
  input  logic [CW-1:0] wr_key,
  input  logic [ROWS-1:0] s_down,
  input  logic [ROWS-1:0] s_up,
  input  logic            refill,
  input  logic [ROWS-1:0] f_set,
  input  logic [ROWS-1:0] f_clr,
  input  logic [ROWS-1:0] e_set,
  output logic [ROWS-1:0] read_line,
  output logic [ROWS-1:0] shift_up_line,
  output logic [ROWS-1:0] write_line,
  output logic [ROWS-1:0] shift_down_line,
  output logic [ROWS-1:0] f,
  output logic [ROWS-1:0] e,
  output logic [CW-1:0]   code [ROWS]
);

  localparam logic [CW-1:0] FREE_CODE = CW'(scb_pkg::therm(NUM_CH-1));

  logic [CW-1:0] c_rd_eq [ROWS];
  logic [CW-1:0] c_rd_ge [ROWS];
  logic [CW-1:0] c_wr_eq [ROWS];
  logic [CW-1:0] c_wr_ge [ROWS];

  for (genvar k = 0; k < ROWS; k++) begin : g_row
    localparam int unsigned INIT_CH = (k < NUM_CH) ? k : NUM_CH - 1;
    localparam logic [CW-1:0] INIT_CODE = CW'(scb_pkg::therm(INIT_CH));
    localparam bit LAST = (k == ROWS - 1);

    logic up_in;   // this row loads from the row below
    logic [CW-1:0] below_code;
    logic f_below, e_below;

    assign up_in      = LAST ? refill : s_up[LAST ? k : k+1];
    assign below_code = LAST ? FREE_CODE : code[LAST ? k : k+1];
    assign f_below    = LAST ? 1'b1 : f[LAST ? k : k+1];
    assign e_below    = LAST ? 1'b0 : e[LAST ? k : k+1];

    for (genvar b = 0; b < CW; b++) begin : g_bit
      scb_cam_cell u_cell (
        .clk       (clk),
        .rst_n     (rst_n),
        .init_bit  (INIT_CODE[b]),
        .s_down    ((k > 0) ? s_down[k] : 1'b0),
        .s_up_below(up_in),
        .bit_above (code[(k > 0) ? k-1 : 0][b]),
        .bit_below (below_code[b]),
        .r_key     (rd_key[b]),
        .w_key     (wr_key[b]),
        .q         (code[k][b]),
        .rd_eq     (c_rd_eq[k][b]),
        .rd_ge     (c_rd_ge[k][b]),
        .wr_eq     (c_wr_eq[k][b]),
        .wr_ge     (c_wr_ge[k][b])
      );
    end

    // F and E fields: move with the row, then apply the controller's set/clear.
    logic f_mv, e_mv;
    always_comb begin
      f_mv = f[k];
      e_mv = e[k];
      if (k > 0 && s_down[k]) begin
        f_mv = f[(k > 0) ? k-1 : 0];
        e_mv = e[(k > 0) ? k-1 : 0];
      end else if (up_in) begin
        f_mv = f_below;
        e_mv = e_below;
      end
    end

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        f[k] <= 1'b1;
        e[k] <= 1'b0;
      end else begin
        f[k] <= (f_mv & ~f_clr[k]) | f_set[k];
        e[k] <= e_mv | e_set[k];
      end
    end

    assign read_line[k]       = (&c_rd_eq[k]) & f[k];
    assign shift_up_line[k]   = &c_rd_ge[k];
    assign write_line[k]      = &c_wr_eq[k];
    assign shift_down_line[k] = (&c_wr_ge[k]) & ~((&c_wr_eq[k]) & e[k]);
  end

endmodule
