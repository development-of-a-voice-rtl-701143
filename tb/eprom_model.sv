// eprom_model: behavioural model of the 4K x 8 bootstrap EPROM chip, for
// testbenches only.  Its contents are a fixed function of the address,
// byte(a) = a * 37 + (a >> 5) (low 8 bits), standing in for the loader and
// diagnostics that a real part would hold.  Output is valid whenever `oe`
// is high (access time is handled by the controller's wait count).
module eprom_model #(
  parameter int unsigned ABITS = 12
) (
  input  logic [ABITS-1:0] addr,
  input  logic             oe,
  output logic [7:0]       data
);
  assign data = oe ? 8'(addr * 37 + (addr >> 5)) : 8'h00;
endmodule
