// scb_pkg: constants and helpers shared by the self-compacting buffer (SCB).
//
// The SCB keeps, for every output channel of a switch input port, a FIFO region inside one
// shared row buffer. Regions are ordered by channel number and compacted on every access.
// The default sizes below are those of the eight-row, four-bit-data, four-channel example
// buffer that the design was demonstrated with; everything is parameterised.
//
// Channel numbers are stored in the channel-pointer CAM as thermometer codes: channel c is held
// as c ones in the low bits of a (NUM_CH-1)-bit word (channel 0 = 000, 1 = 001, 2 = 011,
// 3 = 111 for four channels). With this code a bitwise test "no bit where the key has a one and
// the row a zero" is a magnitude comparison row >= key, which is what the shift_up and
// shift_down lines need. Rows that are free space carry the code of the last channel.
package scb_pkg;

  localparam int unsigned DEF_NUM_CH = 4;  // output channels
  localparam int unsigned DEF_ROWS   = 8;  // rows of CAM and data buffer
  localparam int unsigned DEF_DATA_W = 4;  // bits per data row

  // Width of the thermometer channel code for a given number of channels (at least one bit).
  function automatic int unsigned code_w(int unsigned num_ch);
    return (num_ch > 1) ? num_ch - 1 : 1;
  endfunction

  // Thermometer code of channel ch: ch ones in the least significant bits.
  function automatic logic [31:0] therm(int unsigned ch);
    logic [31:0] t;
    t = '0;
    for (int unsigned i = 0; i < 32; i++) t[i] = (i < ch);
    return t;
  endfunction

endpackage
