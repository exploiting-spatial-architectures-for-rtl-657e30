// ed_chan_if: one valid/ready channel between two processing units.
//
// A token moves when valid and ready are both high on a rising clock edge.
// The sender must hold valid and data steady until the token is taken; the
// assertion below checks that rule. Used for the links inside a row worker
// (diagonal and match/substitute cost channels).
interface ed_chan_if #(parameter type T = logic [7:0]) (input logic clk, input logic rst_n);
  logic valid;
  logic ready;
  T     data;

  modport src (output valid, output data, input ready);
  modport snk (input valid, input data, output ready);

  property p_hold;
    @(posedge clk) (rst_n && valid && !ready) |=> (valid && $stable(data));
  endproperty
  a_hold: assert property (p_hold) else $error("channel dropped or changed a pending token");
endinterface
