// centronics_rx -- peripheral side of a Centronics (printer-port) byte
// handshake.
//
// The host drives a byte on pp_data and pulses pp_nstrobe low. Strobe and
// data are brought into the sample clock domain through two flip-flops. On
// the falling edge of the synchronised strobe the byte is taken, `byte_valid`
// pulses for one clock and pp_busy goes high. The receiver then holds
// pp_nack low for ACK_CYCLES clocks, waits for the strobe to be high again
// and drops pp_busy, ready for the next byte. A host that waits for busy low
// (or for the acknowledge pulse) before each strobe therefore never overruns
// it. That the host link is a Centronics parallel port with handshaking
// follows the description; the signal timing is this implementation's
// choice: ACK_CYCLES = 41 is about 5 us at 8.184 MHz.
//
// Synchronous, active-high reset; idle state: nack high, busy low.
module centronics_rx #(
  parameter int ACK_CYCLES = 41
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] pp_data,
  input  logic       pp_nstrobe,
  output logic       pp_nack,
  output logic       pp_busy,
  output logic       byte_valid,
  output logic [7:0] byte_data
);

  typedef enum logic [1:0] {S_IDLE, S_ACK, S_WAIT_HIGH} state_t;

  localparam int AW = $clog2(ACK_CYCLES + 1);

  state_t         state;
  logic [1:0]     strb_sync;
  logic [7:0]     data_s1, data_s2;
  logic [AW-1:0]  ack_cnt;
  logic           strb_fall;

  always_ff @(posedge clk) begin
    if (rst) begin
      strb_sync <= 2'b11;
      data_s1   <= '0;
      data_s2   <= '0;
    end else begin
      strb_sync <= {strb_sync[0], pp_nstrobe};
      data_s1   <= pp_data;
      data_s2   <= data_s1;
    end
  end

  assign strb_fall = (state == S_IDLE) && !strb_sync[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      pp_nack    <= 1'b1;
      pp_busy    <= 1'b0;
      byte_valid <= 1'b0;
      byte_data  <= '0;
      ack_cnt    <= '0;
    end else begin
      byte_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (strb_fall) begin
          byte_data  <= data_s2;
          byte_valid <= 1'b1;
          pp_busy    <= 1'b1;
          pp_nack    <= 1'b0;
          ack_cnt    <= AW'(ACK_CYCLES - 1);
          state      <= S_ACK;
        end
        S_ACK: begin
          if (ack_cnt == '0) begin
            pp_nack <= 1'b1;
            state   <= S_WAIT_HIGH;
          end else begin
            ack_cnt <= ack_cnt - 1'b1;
          end
        end
        S_WAIT_HIGH: if (strb_sync[1]) begin
          pp_busy <= 1'b0;
          state   <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // a byte is only taken while the receiver is idle
  property p_no_take_when_busy;
    @(posedge clk) disable iff (rst) byte_valid |-> $past(state == S_IDLE);
  endproperty
  a_no_take_when_busy: assert property (p_no_take_when_busy);

endmodule
