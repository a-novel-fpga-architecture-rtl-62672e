// tb_sacha_full: one complete attestation at device size. The static
// partition runs with every parameter at its default; the configuration
// memory model holds all 28,488 frames of the device, of which the last
// 26,400 form the dynamic partition. The verifier configures the 26,399
// application frames plus the nonce frame, reads back all 28,488 frames
// from a random start frame, requests the MAC and checks it and the masked
// frame contents. All checking is done by the end-to-end testbench
// instantiated here; this wrapper only chooses the sizes.
module tb_sacha_full;
  tb_sacha_statpart #(.NF(28488), .NDYN(26400), .ROUND2(0)) u_run ();
endmodule
