// appliance_controller: drives the pin that controls the appliance.
//
// The pin sinks the current of an optical coupler whose diode is fed from
// the supply: a low pin lights the diode, which switches a 12 V relay that
// interrupts the appliance's power; a high pin leaves no voltage across the
// diode and the appliance runs. The controller therefore inverts the
// request: reset_relay_n = !disable_req, so the appliance keeps running
// unless the network controller actively asks for it to be off.
//
// The pin is registered so that it cannot glitch the relay, and it is high
// (appliance running) from reset. reset_relay_n follows disable_req one
// clock later.
//
// The inversion and the current-sinking pin follow the design description;
// the output register and its reset value are this design's choice.
module appliance_controller (
  input  logic clk,
  input  logic rst,
  input  logic disable_req,
  output logic reset_relay_n
);
  always_ff @(posedge clk) begin
    if (rst) reset_relay_n <= 1'b1;
    else     reset_relay_n <= !disable_req;
  end
endmodule
