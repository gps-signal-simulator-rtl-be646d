// frame_assembler -- collects the host's byte stream into per-channel words.
//
// The host sends, for each of NUM_CH channels in turn, a 32-bit word of
// four bytes, most significant first: satellite number (5 bits), amplitude
// (7), overflow flag, underflow flag and code phase (18) -- the layout of
// gps_pkg::chan_word_t. No framing bytes are sent; the position of a byte in
// the stream tells what it is. When the fourth byte of a channel arrives the
// word is stored in that channel's own register (`words`), where it waits
// until the interpolator takes it at the next update boundary. `frame_done`
// pulses when the last channel's word is stored. `resync` (the host's
// initialise line) puts the assembler back at byte 0 of channel 0.
//
// The 4 bytes per satellite, the field widths, the fixed order without extra
// encoding and the per-channel registers follow the description; the bit
// packing, the byte order and the resynchronisation are this
// implementation's choices. Synchronous, active-high reset clears the words.
module frame_assembler #(
  parameter int NUM_CH = gps_pkg::NUM_CH
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                resync,
  input  logic                byte_valid,
  input  logic [7:0]          byte_data,
  output gps_pkg::chan_word_t words [NUM_CH],
  output logic                frame_done
);
  import gps_pkg::*;

  localparam int CHW = (NUM_CH > 1) ? $clog2(NUM_CH) : 1;

  logic [1:0]     byte_idx;
  logic [CHW-1:0] ch_idx;
  logic [23:0]    shreg;

  always_ff @(posedge clk) begin
    if (rst) begin
      byte_idx   <= '0;
      ch_idx     <= '0;
      shreg      <= '0;
      frame_done <= 1'b0;
      for (int c = 0; c < NUM_CH; c++) words[c] <= '0;
    end else begin
      frame_done <= 1'b0;
      if (resync) begin
        byte_idx <= '0;
        ch_idx   <= '0;
      end else if (byte_valid) begin
        byte_idx <= byte_idx + 1'b1;
        if (byte_idx == 2'd3) begin
          words[ch_idx] <= chan_word_t'({shreg, byte_data});
          if (ch_idx == CHW'(NUM_CH - 1)) begin
            ch_idx     <= '0;
            frame_done <= 1'b1;
          end else begin
            ch_idx <= ch_idx + 1'b1;
          end
        end else begin
          shreg <= {shreg[15:0], byte_data};
        end
      end
    end
  end

endmodule
