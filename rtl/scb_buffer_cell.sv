// scb_buffer_cell: one bit of the SCB data buffer.
//
// The cell performs the five row actions of the buffer: shift up (its bit moves to the row
// above), shift down (its bit moves to the row below), hold, write (it takes the write-bus bit)
// and read (it drives its bit onto the read bus). Movement is expressed from the receiving
// side: the cell loads from the row above when its own S_down link is on, and from the row
// below when the S_up link of the row below is on. The storage loop is broken only while data
// moves in; otherwise the cell holds.
//
// Interface: clk; s_down (load bit_above), s_up_below (load bit_below), wt (load w_bit);
// rd gates the stored bit onto r_bit, which the row buffer ORs into the shared read bus.
// Timing: one clock edge per action; r_bit is combinational from the stored bit.
//
// The action set and the per-row sharing of the controls follow the described cell. The
// single-clock flip-flop in place of the two-phase dynamic circuit, the priority
// write > shift down > shift up > hold, and the AND-OR read bus are this design's choices.
module scb_buffer_cell (
  input  logic clk,
  input  logic s_down,      // load from the row above
  input  logic s_up_below,  // load from the row below
  input  logic wt,          // load from the write bus
  input  logic rd,          // drive the read bus
  input  logic w_bit,
  input  logic bit_above,
  input  logic bit_below,
  output logic q,
  output logic r_bit
);

  always_ff @(posedge clk) begin
    if (wt)              q <= w_bit;
    else if (s_down)     q <= bit_above;
    else if (s_up_below) q <= bit_below;
  end

  assign r_bit = rd & q;

endmodule
