// hs4_checker -- protocol assertions for a four-phase request/acknowledge link.
//
// The four-phase (return-to-zero) handshake between the receiver and the
// sender goes: REQ rises with data valid; ACK rises; REQ falls; ACK falls.
// Each signal may change only in its turn, and the data must not change while
// REQ is high and ACK has not yet answered. A change of REQ is compared with
// ACK as it is now, a change of ACK with REQ as it was one clock earlier, so
// a requester that answers a change of ACK within the same cycle passes. This module holds those rules as
// concurrent assertions; it has no outputs and adds no logic. It is
// instantiated on the link between the receiver and the sender and may be
// attached to any other link that follows the same rules.
//
// Interface: clk, rst, req, ack, data (width W) in.
module hs4_checker #(
  parameter int unsigned W = 8
) (
  input logic         clk,
  input logic         rst,
  input logic         req,
  input logic         ack,
  input logic [W-1:0] data
);

  a_req_rise: assert property (@(posedge clk) disable iff (rst) $rose(req) |-> !ack)
    else $error("hs4: REQ rose while ACK was high");
  a_req_fall: assert property (@(posedge clk) disable iff (rst) $fell(req) |-> ack)
    else $error("hs4: REQ fell before ACK rose");
  a_ack_rise: assert property (@(posedge clk) disable iff (rst) $rose(ack) |-> $past(req))
    else $error("hs4: ACK rose without REQ");
  a_ack_fall: assert property (@(posedge clk) disable iff (rst) $fell(ack) |-> !$past(req))
    else $error("hs4: ACK fell while REQ was high");
  a_data:     assert property (@(posedge clk) disable iff (rst)
                               req && $past(req) && !$past(ack) |-> $stable(data))
    else $error("hs4: data changed before ACK");

endmodule
