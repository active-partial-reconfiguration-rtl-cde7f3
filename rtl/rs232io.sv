// rs232io: serial transmitter by which the fixed region asks the host PC for a
// reconfiguration. When send_data rises, the byte on statusdata is captured and
// sent on pin_rs232_td as one RS-232 frame: a start bit (0), eight data bits
// least significant first, one stop bit (1); the line idles at 1. Each bit lasts
// CLKS_PER_BIT = CLK_HZ / BAUD clock cycles, so a frame takes 10 * CLKS_PER_BIT
// cycles. The start bit begins on the clock edge that sees send_data high after
// it was low. A request that arrives while a frame is in flight is held (one
// deep) and sent right after it; further requests in that time are dropped.
// reset_pushbtn is an active-high synchronous reset.
//
// The role of the block and its port list follow the original design, which
// gives neither its insides nor its line settings: the frame format (8N1), the
// default 9600 baud and the one-deep request hold are this design's choices.
// The receive pin is part of the port list but is not used: nothing is read
// from the host.
module rs232io #(
  parameter int unsigned CLK_HZ = 100_000_000,
  parameter int unsigned BAUD   = 9600
) (
  input  logic       pin_sysclk,
  input  logic       send_data,
  input  logic [7:0] statusdata,
  input  logic       reset_pushbtn,
  input  logic       pin_rs232_rd,
  output logic       pin_rs232_td
);

  localparam int unsigned CLKS_PER_BIT = CLK_HZ / BAUD;
  localparam int unsigned CNT_W = (CLKS_PER_BIT > 1) ? $clog2(CLKS_PER_BIT) : 1;

  typedef enum logic [1:0] {
    TX_IDLE,
    TX_START,
    TX_DATA,
    TX_STOP
  } tx_state_e;

  tx_state_e        state;
  logic             send_d;
  logic             pend;
  logic [7:0]       pend_byte;
  logic [7:0]       shreg;
  logic [2:0]       bit_idx;
  logic [CNT_W-1:0] baud_cnt;

  wire req_rise = send_data & ~send_d;
  wire bit_end  = (baud_cnt == CNT_W'(CLKS_PER_BIT - 1));

  always_ff @(posedge pin_sysclk) begin
    if (reset_pushbtn) begin
      state        <= TX_IDLE;
      send_d       <= 1'b0;
      pend         <= 1'b0;
      pend_byte    <= '0;
      shreg        <= '0;
      bit_idx      <= '0;
      baud_cnt     <= '0;
      pin_rs232_td <= 1'b1;
    end else begin
      send_d <= send_data;
      unique case (state)
        TX_IDLE: begin
          baud_cnt <= '0;
          if (pend) begin
            // Oldest request first; a new one waits in the hold register.
            shreg        <= pend_byte;
            pin_rs232_td <= 1'b0;
            state        <= TX_START;
            pend         <= req_rise;
            if (req_rise) pend_byte <= statusdata;
          end else if (req_rise) begin
            shreg        <= statusdata;
            pin_rs232_td <= 1'b0;
            state        <= TX_START;
          end
        end
        default: begin
          if (req_rise && !pend) begin
            pend      <= 1'b1;
            pend_byte <= statusdata;
          end
          baud_cnt <= bit_end ? '0 : baud_cnt + 1'b1;
          if (bit_end) begin
            unique case (state)
              TX_START: begin
                pin_rs232_td <= shreg[0];
                shreg        <= shreg >> 1;
                bit_idx      <= '0;
                state        <= TX_DATA;
              end
              TX_DATA: begin
                if (bit_idx == 3'd7) begin
                  pin_rs232_td <= 1'b1;
                  state        <= TX_STOP;
                end else begin
                  pin_rs232_td <= shreg[0];
                  shreg        <= shreg >> 1;
                  bit_idx      <= bit_idx + 1'b1;
                end
              end
              default: begin  // TX_STOP
                state <= TX_IDLE;
              end
            endcase
          end
        end
      endcase
    end
  end

  initial begin
    assert (CLKS_PER_BIT >= 2)
      else $error("rs232io: CLK_HZ / BAUD must be at least 2");
  end

endmodule
