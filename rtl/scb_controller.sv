// scb_controller: the buffer/pointer controller of the self-compacting buffer.
//
// From the CAM's read, shift_up, write and shift_down lines and the F/E fields it finds the two rows an access touches and
// generates the actual shift, write and flag signals for the data buffer and the CAM:
//   read row  r : the first row of the read channel (F=1) if it holds data (E=1);
//   write row w : the empty end row of the write channel (E=0, first such row of the channel).
// A write alone inserts a row at w: the data goes into row w, everything below moves down one
// row (S_down) and row w+1 becomes the channel's new empty end row. A read alone removes row r:
// everything below moves up one row (S_up) and the last row becomes free. For a simultaneous
// read and write only the rows between the two move, so the buffer below both is untouched:
//   w < r  rows w+1..r move down (S_up is cancelled), row r+1 becomes the read channel's top;
//   w > r  rows r..w-1 move up (S_down is cancelled) and the data goes into row w-1.
// Both cases come out of one rule: S_down = below(w) & ~after(r), S_up = after(r) & ~below(w).
// A write is accepted unless the buffer is full, or when it is full but a read is accepted
// in the same cycle; a read is accepted when its channel holds data.
//
// Interface: all vectors have one bit per row (bit k = row k; for s_down/s_up bit k is the
// link between rows k-1 and k; row 0 has no link above it, so bit 0 of both is always 0).
// Purely combinational.
//
// The operations, the row-move rules, the cancellation of one shift direction for a combined
// access and the S_up/S_down vectors of the worked example (see README) follow the described design.
// How the rows are found from F/E, the full rule (data rows = ROWS - NUM_CH, one end row per
// channel) and the acceptance rules are this design's choices.
module scb_controller #(
  parameter int unsigned NUM_CH = scb_pkg::DEF_NUM_CH,
  parameter int unsigned ROWS   = scb_pkg::DEF_ROWS
) (
  input  logic            rd_en,
  input  logic            wr_en,
  input  logic [ROWS-1:0] read_line,
  input  logic [ROWS-1:0] shift_up_line,
  input  logic [ROWS-1:0] write_line,
  input  logic [ROWS-1:0] shift_down_line,
  input  logic [ROWS-1:0] f,
  input  logic [ROWS-1:0] e,
  output logic            rd_ok,
  output logic            wr_ok,
  output logic            full,
  output logic [ROWS-1:0] rd_row,
  output logic [ROWS-1:0] wr_row,
  output logic [ROWS-1:0] s_down,
  output logic [ROWS-1:0] s_up,
  output logic            refill,
  output logic [ROWS-1:0] f_set,
  output logic [ROWS-1:0] f_clr,
  output logic [ROWS-1:0] e_set
);

  localparam int unsigned CAPACITY = ROWS - NUM_CH;
  localparam int unsigned CNT_W    = $clog2(ROWS + 1);

  logic [ROWS-1:0] wr_first;  // end row of the write channel
  logic [ROWS-1:0] wr_hit;    // ... when the write is accepted
  logic [ROWS-1:0] below_w;   // rows below the write row
  logic [ROWS-1:0] after_r;   // rows below the read row
  logic [CNT_W-1:0] used;

  always_comb begin
    used = '0;
    for (int k = 0; k < ROWS; k++) used += CNT_W'(e[k]);
  end
  assign full = (used >= CNT_W'(CAPACITY));

  assign rd_row = rd_en ? (read_line & e) : '0;
  assign rd_ok  = |rd_row;
  assign wr_ok  = wr_en & (~full | rd_ok);

  always_comb begin
    for (int k = 0; k < ROWS; k++) begin
      wr_first[k] = write_line[k] & ~e[k]
                  & ((k == 0) || !(write_line[(k > 0) ? k-1 : 0] & ~e[(k > 0) ? k-1 : 0]));
    end
    wr_hit  = wr_ok ? wr_first : '0;
    below_w = wr_ok ? (shift_down_line & ~wr_first) : '0;
    after_r = rd_ok ? (shift_up_line & ~rd_row) : '0;
  end

  always_comb begin
    s_down = below_w & ~after_r;
    s_up   = after_r & ~below_w;
    s_down[0] = 1'b0;
    s_up[0]   = 1'b0;
    refill = rd_ok & ~wr_ok;
    for (int k = 0; k < ROWS; k++) begin
      // data goes into the end row, or one row higher when the read pulls that row up
      wr_row[k] = (wr_hit[k] & ~after_r[k])
                | ((k < ROWS-1) && wr_hit[(k < ROWS-1) ? k+1 : k] && after_r[(k < ROWS-1) ? k+1 : k]);
      // the row copied from the old end row is the new end row: not a first row
      f_clr[k]  = ((k > 0) && s_down[k] && wr_hit[(k > 0) ? k-1 : 0]) | (wr_hit[k] & after_r[k]);
      // the read channel's next row becomes its first row
      f_set[k]  = (rd_row[k] & ~s_down[k])
                | ((k > 0) && rd_row[(k > 0) ? k-1 : 0] && s_down[(k > 0) ? k-1 : 0]);
    end
    e_set = wr_row;
  end

endmodule
