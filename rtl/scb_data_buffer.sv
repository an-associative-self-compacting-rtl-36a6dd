// scb_data_buffer: the data half of the self-compacting buffer, ROWS x DATA_W buffer cells.
//
// All cells of a row share the row's S_down, S_up, write and read controls. A row loads the row
// above when s_down[k] is set and the row below when s_up[k+1] is set (the link between rows k
// and k+1 carries data upward), takes the write bus when wr_row[k] is set, and drives the read
// bus when rd_row[k] is set. Row 0 has nothing above it; the last row has nothing below it and
// keeps its content when asked to load from below (its content is then a free row).
//
// Interface: per-row one-hot wr_row and rd_row, per-link s_down/s_up (bit k is the link
// between rows k-1 and k; bit 0 is unused), wdata, combinational rdata.
// Timing: one update per clock edge; rdata follows rd_row in the same cycle.
//
// Row actions and shared controls follow the described buffer; the link numbering, which
// matches the S_up/S_down vectors of the worked example (see README), is this design's choice.
module scb_data_buffer #(
  parameter int unsigned ROWS   = scb_pkg::DEF_ROWS,
  parameter int unsigned DATA_W = scb_pkg::DEF_DATA_W
) (
  input  logic              clk,
  input  logic [ROWS-1:0]   wr_row,
  input  logic [ROWS-1:0]   rd_row,
  input  logic [ROWS-1:0]   s_down,
  input  logic [ROWS-1:0]   s_up,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata,
  output logic [DATA_W-1:0] row_q [ROWS]
);

  logic [DATA_W-1:0] r_bits [ROWS];

  for (genvar k = 0; k < ROWS; k++) begin : g_row
    for (genvar b = 0; b < DATA_W; b++) begin : g_bit
      scb_buffer_cell u_cell (
        .clk       (clk),
        .s_down    ((k > 0) ? s_down[k] : 1'b0),
        .s_up_below((k < ROWS-1) ? s_up[(k < ROWS-1) ? k+1 : k] : 1'b0),
        .wt        (wr_row[k]),
        .rd        (rd_row[k]),
        .w_bit     (wdata[b]),
        .bit_above (row_q[(k > 0) ? k-1 : 0][b]),
        .bit_below (row_q[(k < ROWS-1) ? k+1 : k][b]),
        .q         (row_q[k][b]),
        .r_bit     (r_bits[k][b])
      );
    end
  end

  // Read bus: the selected row's bits, ORed over all rows (at most one row reads).
  always_comb begin
    rdata = '0;
    for (int k = 0; k < ROWS; k++) rdata |= r_bits[k];
  end

endmodule
