// tb_scb_buffer_cell: random actions on one buffer cell, checked against a reference bit.
// Checks the stored bit after every edge (write > shift down > shift up > hold) and the read
// output gating in every cycle.
module tb_scb_buffer_cell;
  logic clk = 0;
  logic s_down, s_up_below, wt, rd, w_bit, bit_above, bit_below, q, r_bit;
  logic model;
  int checks = 0, failures = 0;

  scb_buffer_cell dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {s_down, s_up_below, wt, rd, w_bit, bit_above, bit_below} = '0;
    wt = 1; w_bit = 0;
    @(posedge clk); #1;
    model = 0;
    for (int i = 0; i < 400; i++) begin
      {s_down, s_up_below, wt, rd, w_bit, bit_above, bit_below} = 7'($urandom);
      #1;
      checks++;
      if (r_bit !== (rd & model)) begin failures++; $display("read mismatch at %0d", i); end
      @(posedge clk);
      if (wt) model = w_bit;
      else if (s_down) model = bit_above;
      else if (s_up_below) model = bit_below;
      #1;
      checks++;
      if (q !== model) begin failures++; $display("state mismatch at %0d: q=%b exp=%b", i, q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
