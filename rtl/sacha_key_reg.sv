// sacha_key_reg: register that holds the 128-bit AES-CMAC key of the
// prover.
//
// After reset it holds KEY_RESET, the key provisioned with the device. A
// key-generating PUF, when present, can load a new key with `load`. The key
// register in the static partition follows the proof-of-concept; the load
// port for a PUF follows the architecture in which the PUF feeds the MAC.
// The reset key is this design's choice (the RFC 4493 example key).
module sacha_key_reg #(
  parameter logic [127:0] KEY_RESET = 128'h2b7e1516_28aed2a6_abf71588_09cf4f3c
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [127:0] key_in,
  output logic [127:0] key
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    key <= KEY_RESET;
    else if (load) key <= key_in;
  end
endmodule
