// socbus_drain_wrapper -- network end of a drain wrapper.
//
// Terminates circuits at the destination. When a request packet arrives
// from the local output of the switch, the wrapper answers in the next
// cycle with a positive acknowledgment, which travels back along the locked
// route to the source (phase II), or, if the IP block has rx_accept low,
// with a negative acknowledgment, which releases the route like a blocked
// switch would. Once the circuit is open, every forward word with ctrl=1 is
// a payload byte and is handed to the IP block; the route cancel word ends
// the transfer. Acknowledging at the destination follows the document; the
// rx_accept refusal and the IP-side signals are this design's choice.
//
// IP side: rx_start pulses when a circuit is accepted, rx_valid/rx_data
// carry each payload byte (no backpressure: a circuit delivers at link
// rate, so the IP side must take a byte every cycle), rx_end pulses at the
// cancel. All IP-side outputs are registered, one cycle after the word is
// at net_fwd. Clock-domain bridging and buffering are not part of this
// block; it runs on the network clock.
module socbus_drain_wrapper
  import socbus_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // network side
  input  fwd_t              net_fwd,
  output rev_t              net_rev,
  // IP side
  input  logic              rx_accept,
  output logic              rx_start,
  output logic              rx_valid,
  output logic [DATA_W-1:0] rx_data,
  output logic              rx_end
);

  typedef enum logic [1:0] { D_IDLE, D_ACK, D_NACK, D_RECV } drain_state_t;

  drain_state_t state_q;

  assign net_rev = (state_q == D_ACK)  ? REV_ACK :
                   (state_q == D_NACK) ? REV_NACK : REV_NONE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= D_IDLE;
      rx_start <= 1'b0;
      rx_valid <= 1'b0;
      rx_data  <= '0;
      rx_end   <= 1'b0;
    end else begin
      rx_start <= 1'b0;
      rx_valid <= 1'b0;
      rx_end   <= 1'b0;
      unique case (state_q)
        D_IDLE: if (net_fwd.ctrl) state_q <= rx_accept ? D_ACK : D_NACK;
        D_ACK: begin
          state_q  <= D_RECV;
          rx_start <= 1'b1;
        end
        D_NACK: state_q <= D_IDLE;
        D_RECV: begin
          if (net_fwd.ctrl) begin
            rx_valid <= 1'b1;
            rx_data  <= net_fwd.data;
          end else if (is_cancel(net_fwd)) begin
            rx_end  <= 1'b1;
            state_q <= D_IDLE;
          end
        end
        default: state_q <= D_IDLE;
      endcase
    end
  end

endmodule
