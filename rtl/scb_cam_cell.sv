// scb_cam_cell: one channel-number bit of the SCB channel-pointer CAM.
//
// The cell stores one bit of its row's channel code. The bit is loaded with the row's
// initial channel bit during reset, and afterwards moves with its row exactly like a data
// buffer cell (load from the row above on S_down, from the row below on S_up).
// Against the read address bit r_key and the write address bit w_key it produces the four
// per-bit comparison results that the row ANDs into its match lines:
//   rd_eq / wr_eq   stored bit equals the key bit (read / write line is kept high);
//   rd_ge / wr_ge   false only when the key bit is one and the stored bit zero, the one case
//                   that discharges the shift_up / shift_down line. With thermometer codes the
//                   AND of these over a row is "row channel >= key channel".
// Interface: clk, rst_n (synchronous load of init_bit), shift controls, key bits; q is the
// stored bit. Timing: storage updates on the clock edge; comparisons are combinational.
//
// The reset load, the equality read/write lines and the four shift-line cases follow the
// described cell. The precharged lines become AND reductions and the two-phase clock one
// edge; those are this design's choices.
module scb_cam_cell (
  input  logic clk,
  input  logic rst_n,
  input  logic init_bit,
  input  logic s_down,
  input  logic s_up_below,
  input  logic bit_above,
  input  logic bit_below,
  input  logic r_key,
  input  logic w_key,
  output logic q,
  output logic rd_eq,
  output logic rd_ge,
  output logic wr_eq,
  output logic wr_ge
);

  always_ff @(posedge clk) begin
    if (!rst_n)          q <= init_bit;
    else if (s_down)     q <= bit_above;
    else if (s_up_below) q <= bit_below;
  end

  assign rd_eq = (q == r_key);
  assign wr_eq = (q == w_key);
  assign rd_ge = !(r_key && !q);
  assign wr_ge = !(w_key && !q);

endmodule
