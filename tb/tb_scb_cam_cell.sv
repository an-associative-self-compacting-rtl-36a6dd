// tb_scb_cam_cell: the four comparison cases of a CAM bit (key 0/1 against stored 0/1) for
// the read and write keys, the reset load and the shift paths of the stored bit.
module tb_scb_cam_cell;
  logic clk = 0, rst_n;
  logic init_bit, s_down, s_up_below, bit_above, bit_below, r_key, w_key;
  logic q, rd_eq, rd_ge, wr_eq, wr_ge;
  logic model;
  int checks = 0, failures = 0;

  scb_cam_cell dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %b expected %b", what, got, exp); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {s_down, s_up_below, bit_above, bit_below, r_key, w_key} = '0;
    for (int ib = 0; ib < 2; ib++) begin
      rst_n = 0; init_bit = ib[0];
      @(posedge clk); #1;
      chk(q, ib[0], "reset load");
      rst_n = 1;
      // Cases 1-4 of the shift line, and equality of the read/write lines
      for (int kb = 0; kb < 4; kb++) begin
        r_key = kb[0]; w_key = kb[1]; #1;
        chk(rd_eq, r_key == ib[0], "read line");
        chk(wr_eq, w_key == ib[0], "write line");
        chk(rd_ge, (r_key == 1'b0) || (ib[0] == 1'b1), "shift_up line");
        chk(wr_ge, (w_key == 1'b0) || (ib[0] == 1'b1), "shift_down line");
      end
    end
    rst_n = 1; model = q;
    for (int i = 0; i < 300; i++) begin
      {s_down, s_up_below, bit_above, bit_below} = 4'($urandom);
      @(posedge clk);
      if (s_down) model = bit_above; else if (s_up_below) model = bit_below;
      #1;
      chk(q, model, "shifted bit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
