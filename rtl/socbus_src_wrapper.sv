// socbus_src_wrapper -- network end of a source wrapper.
//
// Moves one transfer at a time from an IP block into the network using the
// packet connected circuit (PCC) transaction: (I) send a request packet
// holding the destination address into the local switch, (II) wait for the
// acknowledgment that comes back once the whole route is locked, (III)
// stream the payload words, (IV) send the route cancel that frees the
// route. If a negative acknowledgment comes back instead (Ia), the wrapper
// waits RETRY_DELAY cycles and sends the request again (Ib), as often as
// it takes. These phases follow the document.
//
// IP side (this design's choice, the document leaves the wrapper's IP side
// open): a command (cmd_dest, cmd_len) accepted with cmd_valid/cmd_ready,
// then cmd_len payload bytes taken with tx_valid/tx_ready; tx_ready is high
// only while the circuit is open. done pulses when the cancel is sent,
// retry pulses on each negative acknowledgment. The IP side runs on the
// network clock: the clock-domain bridge and the format conversion the
// document assigns to wrappers are not part of this block.
//
// Network side: net_fwd drives the local input of the switch, net_rev is
// that input's reverse control. A request word goes out the cycle after
// the command is taken; the first payload word can go out the cycle after
// the acknowledgment arrives; the cancel follows the last word directly.
module socbus_src_wrapper
  import socbus_pkg::*;
#(
  parameter int unsigned LEN_W       = 16,
  parameter int unsigned RETRY_DELAY = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // IP side
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  logic [DATA_W-1:0] cmd_dest,
  input  logic [LEN_W-1:0]  cmd_len,
  input  logic              tx_valid,
  output logic              tx_ready,
  input  logic [DATA_W-1:0] tx_data,
  output logic              done,
  output logic              retry,
  // network side
  output fwd_t              net_fwd,
  input  rev_t              net_rev
);

  typedef enum logic [2:0] {
    W_IDLE, W_REQ, W_WAIT, W_BACKOFF, W_XFER, W_CANCEL
  } src_state_t;

  src_state_t        state_q;
  logic [DATA_W-1:0] dest_q;
  logic [LEN_W-1:0]  left_q;
  logic [15:0]       wait_q;

  assign cmd_ready = (state_q == W_IDLE);
  assign tx_ready  = (state_q == W_XFER);
  assign done      = (state_q == W_CANCEL);
  assign retry     = (state_q == W_WAIT) && (net_rev == REV_NACK);

  always_comb begin
    unique case (state_q)
      W_REQ:    net_fwd = '{ctrl: 1'b1, data: dest_q};
      W_XFER:   net_fwd = tx_valid ? '{ctrl: 1'b1, data: tx_data} : FWD_IDLE;
      W_CANCEL: net_fwd = FWD_CANCEL_WORD;
      default:  net_fwd = FWD_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= W_IDLE;
      dest_q  <= '0;
      left_q  <= '0;
      wait_q  <= '0;
    end else begin
      unique case (state_q)
        W_IDLE: if (cmd_valid) begin
          dest_q  <= cmd_dest;
          left_q  <= cmd_len;
          state_q <= W_REQ;
        end
        W_REQ: state_q <= W_WAIT;
        W_WAIT: begin
          if (net_rev == REV_ACK) begin
            state_q <= (left_q == '0) ? W_CANCEL : W_XFER;
          end else if (net_rev == REV_NACK) begin
            wait_q  <= 16'(RETRY_DELAY);
            state_q <= W_BACKOFF;
          end
        end
        W_BACKOFF: begin
          if (wait_q <= 16'd1) state_q <= W_REQ;
          else wait_q <= wait_q - 16'd1;
        end
        W_XFER: if (tx_valid) begin
          left_q <= left_q - 1'b1;
          if (left_q == LEN_W'(1)) state_q <= W_CANCEL;
        end
        W_CANCEL: state_q <= W_IDLE;
        default: state_q <= W_IDLE;
      endcase
    end
  end

endmodule
