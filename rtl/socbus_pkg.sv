// socbus_pkg -- types and constants shared by the SoCBUS network blocks.
//
// SoCBUS is a two-dimensional mesh of five-port circuit switches. Every
// link, switch to switch and switch to wrapper, has the same format in each
// direction: eight forward data wires that carry both route request packets
// and payload, one forward control wire, and two reverse control wires that
// carry the acknowledgments. Those widths follow the document.
//
// The encodings on these wires are this design's own choice:
//   forward {ctrl, data}
//     ctrl=1            a request packet (when the receiving input is idle)
//                       or a payload word (when the circuit is open)
//     ctrl=0, data=0    nothing
//     ctrl=0, data=FWD_CANCEL   route cancel, closes the circuit
//   reverse
//     REV_NONE, REV_ACK (positive acknowledgment), REV_NACK (negative)
// A request packet is a single word holding the destination address, so one
// request fits the 8 data wires for networks of up to 256 nodes (16x16).
// Port numbering: 0 north, 1 east, 2 south, 3 west, 4 local (the "down"
// direction to the wrapper of the tile).
package socbus_pkg;

  localparam int unsigned DATA_W = 8;   // forward data wires per link
  localparam int unsigned NPORTS = 5;   // four neighbours and the local port
  localparam int unsigned PORT_W = 3;   // bits to number a port

  localparam int unsigned P_NORTH = 0;
  localparam int unsigned P_EAST  = 1;
  localparam int unsigned P_SOUTH = 2;
  localparam int unsigned P_WEST  = 3;
  localparam int unsigned P_LOCAL = 4;

  localparam logic [DATA_W-1:0] FWD_CANCEL = 8'h01;

  typedef struct packed {
    logic              ctrl;
    logic [DATA_W-1:0] data;
  } fwd_t;

  typedef enum logic [1:0] {
    REV_NONE = 2'b00,
    REV_ACK  = 2'b01,
    REV_NACK = 2'b10
  } rev_t;

  localparam fwd_t FWD_IDLE = '{ctrl: 1'b0, data: '0};
  localparam fwd_t FWD_CANCEL_WORD = '{ctrl: 1'b0, data: FWD_CANCEL};

  // States of the switch input FSM, numbered as in the state chart.
  typedef enum logic [3:0] {
    S_IDLE      = 4'd1,
    S_TRY_ROUTE = 4'd2,
    S_NACK      = 4'd3,
    S_LOCK      = 4'd4,
    S_PASS_REQ  = 4'd5,
    S_WAIT_ACK  = 4'd6,
    S_SEND_ACK  = 4'd7,
    S_TRANSFER  = 4'd8,
    S_UNLOCK    = 4'd9
  } in_state_t;

  function automatic logic is_cancel(fwd_t w);
    return (w.ctrl == 1'b0) && (w.data == FWD_CANCEL);
  endfunction

endpackage
