// tb_sacha_statpart: end-to-end attestation run of the static partition
// against the ICAP/configuration-memory model, with the testbench playing
// the verifier.
//
// Round 1 follows the protocol: the dynamic partition (frames NF-NDYN ..
// NF-1, which start out holding "malicious" content) is overwritten with
// ICAP_config packets, application frames first and the frame holding a
// 64-bit nonce last; every frame is then read back with ICAP_readback,
// starting at a random frame i and wrapping modulo NF; MAC_checksum
// returns the device's MAC. The verifier recomputes the MAC over the frames
// it received (H_Prv == H_Vrf), masks the register bits out of the received
// frames and of its golden image and compares them (B_Prv == B_Vrf).
// Round 2 (small runs only) has an adversary change one static frame after
// configuration, uses a new nonce, another start frame and reads two frames
// twice; the MAC must still match the received data and the masked
// comparison must now expose the change.
//
// Mechanisms counted, each must occur: frame configurations, read-backs,
// MAC init, MAC finalize on whole blocks (K1) and on a tail (K2, small runs),
// a packet dropped while a command executes (the verifier then resends), and
// the TX FSM stalling because the outgoing FIFO is still full (small runs).
module tb_sacha_statpart #(
  parameter int unsigned NF     = 10,   // frames in the configuration memory
  parameter int unsigned NDYN   = 6,    // frames in the dynamic partition
  parameter bit          ROUND2 = 1
);
  import sacha_pkg::*;
  import sacha_ref_pkg::*;
  localparam int unsigned FW = FRAME_WORDS_DEF, REGW = 7;
  localparam logic [127:0] KEY = 128'h2b7e1516_28aed2a6_abf71588_09cf4f3c;

  logic clk_rx = 0, clk_tx = 0, clk_icap = 0;
  logic rst_rx_n = 0, rst_tx_n = 0, rst_icap_n = 0;
  always #4 clk_rx = ~clk_rx;                      // 125 MHz
  initial begin #3; forever #4 clk_tx = ~clk_tx; end  // 125 MHz, own phase
  always #5 clk_icap = ~clk_icap;                  // 100 MHz

  logic rx_valid = 0, rx_last = 0, tx_ready = 1, key_load = 0;
  logic [7:0] rx_data = 0, tx_data;
  logic tx_valid, tx_last, icap_csib, icap_rdwrb, rx_busy, icap_busy, tx_stall, mac_active;
  logic [31:0] icap_i, icap_o;
  logic [127:0] key_in = '0;
  logic [15:0] rx_drop_count;

  sacha_statpart dut (.*);

  sacha_icap_cfgmem_model #(.NFRAMES(NF), .FRAME_WORDS(FW), .REG_WORD(REGW)) cm (
    .clk(clk_icap), .csib(icap_csib), .rdwrb(icap_rdwrb), .i(icap_i), .o(icap_o));

  int checks = 0, failures = 0;
  int n_cfg = 0, n_rb = 0, n_init = 0, n_fin_k1 = 0, n_fin_k2 = 0, n_drop = 0, n_stall = 0;

  // Mechanism counters, observed at the ports: a MAC computation starting
  // (mac_active rising), the TX FSM stalling. Finalize paths are counted
  // when a returned MAC checks out, by whether the data ended on a whole
  // block (K1) or in a padded tail (K2).
  logic mac_active_q = 0;
  always @(posedge clk_tx) begin
    mac_active_q <= rst_tx_n && mac_active;
    if (rst_tx_n && mac_active && !mac_active_q) n_init++;
  end
  always @(posedge clk_tx) if (rst_tx_n && tx_stall) n_stall++;

  // ---------------- verifier: receive side
  logic [7:0] cur [$];
  logic [7:0] pkts [$][$];
  always @(posedge clk_tx) if (rst_tx_n && tx_valid && tx_ready) begin
    cur.push_back(tx_data);
    if (tx_last) begin pkts.push_back(cur); cur.delete(); end
  end

  // ---------------- verifier: send side
  task automatic send(input logic [7:0] pay [$]);
    for (int i = 0; i < 14 + pay.size(); i++) begin
      @(negedge clk_rx);
      rx_valid = 1;
      rx_data  = (i < 14) ? 8'(8'h10 + i) : pay[i - 14];
      rx_last  = (i == 14 + pay.size() - 1);
    end
    @(negedge clk_rx); rx_valid = 0; rx_last = 0;
    repeat (12) @(negedge clk_rx);    // inter-packet gap
  endtask

  function automatic void put_word(ref logic [7:0] p [$], input logic [31:0] w);
    for (int i = 0; i < 4; i++) p.push_back(w[31 - 8*i -: 8]);
  endfunction

  task automatic wait_idle();
    @(negedge clk_rx);
    while (rx_busy) @(negedge clk_rx);
  endtask

  logic [31:0] golden [NF * FW];
  logic [31:0] got    [NF * FW];

  task automatic config_frame(input int unsigned a);
    logic [7:0] p [$];
    put_word(p, {CMD_ICAP_CONFIG, 24'h0});
    put_word(p, 32'(a));
    for (int k = 0; k < FW; k++) put_word(p, golden[a * FW + k]);
    send(p);
    n_cfg++;
  endtask

  task automatic readback_cmd(input int unsigned a);
    logic [7:0] p [$];
    put_word(p, {CMD_ICAP_READBACK, 24'h0});
    put_word(p, 32'(a));
    send(p);
  endtask

  task automatic take_frame(input int unsigned a, cmac_ref m);
    logic [7:0] p [$];
    while (pkts.size() == 0) @(negedge clk_rx);
    p = pkts.pop_front();
    checks++;
    if (p.size() != 19 + 4 * FW || p[14] !== RSP_FRAME || {p[15], p[16], p[17], p[18]} !== 32'(a)) begin
      failures++; $display("FAIL frame packet for %0d: size %0d", a, p.size()); return;
    end
    for (int k = 0; k < FW; k++) begin
      logic [31:0] w;
      w = {p[19+4*k], p[20+4*k], p[21+4*k], p[22+4*k]};
      got[a * FW + k] = w;
      m.add_word(w);
    end
    n_rb++;
  endtask

  task automatic get_mac(output logic [127:0] h);
    logic [7:0] p [$];
    p.push_back(CMD_MAC_CHECKSUM); p.push_back(0); p.push_back(0); p.push_back(0);
    wait_idle();
    send(p);
    while (pkts.size() == 0) @(negedge clk_rx);
    p = pkts.pop_front();
    checks++;
    if (p.size() != 31 || p[14] !== RSP_CHECKSUM) begin failures++; $display("FAIL checksum packet"); end
    for (int i = 0; i < 16; i++) h[127 - 8*i -: 8] = p[15 + i];
  endtask

  // Masked comparison of what was received with the golden image.
  function automatic int masked_diffs();
    int d = 0;
    for (int f = 0; f < NF; f++) for (int k = 0; k < FW; k++) begin
      logic [31:0] m;
      m = (k == REGW) ? 32'hFFFF_FF00 : 32'hFFFF_FFFF;
      if ((got[f * FW + k] & m) !== (golden[f * FW + k] & m)) d++;
    end
    return d;
  endfunction

  // One attestation round: configure, read back from `start` (plus `extra`
  // repeated frames), checksum, verify.
  task automatic attest(input int unsigned start, input int unsigned extra, input logic [63:0] nonce,
                        input bit reconfigure, input bit expect_clean, input bit force_stall);
    cmac_ref m;
    logic [127:0] h_prv, h_vrf;
    int d;
    time t0, t1, t2;
    m = new(KEY);
    t0 = $time;
    if (reconfigure) begin
      // Application frames, then the nonce frame (the last dynamic frame).
      for (int f = NF - NDYN; f < NF - 1; f++) begin
        for (int k = 0; k < FW; k++) golden[f * FW + k] = 32'(f * 32'h9E37_79B9) ^ 32'(k * 32'h85EB_CA6B);
        wait_idle();
        config_frame(f);
        // Once: a read-back right behind a configuration is dropped.
        if (f == NF - NDYN) begin
          int d0;
          d0 = rx_drop_count;
          readback_cmd(0);
          checks++;
          if (rx_drop_count != 16'(d0 + 1)) begin failures++; $display("FAIL expected drop"); end
          else n_drop++;
        end
      end
      for (int k = 0; k < FW; k++) golden[(NF - 1) * FW + k] = '0;
      golden[(NF - 1) * FW + 0] = nonce[63:32];
      golden[(NF - 1) * FW + 1] = nonce[31:0];
      wait_idle();
      config_frame(NF - 1);
    end
    wait_idle();
    t1 = $time;
    for (int j = 0; j < NF + extra; j++) begin
      int unsigned a;
      a = (start + j) % NF;
      wait_idle();
      if (force_stall && j == 0) tx_ready = 0;
      readback_cmd(a);
      if (force_stall && j == 0) begin
        // Second read-back while the first frame still fills the TX FIFO.
        int unsigned a2;
        a2 = (start + 1) % NF;
        wait_idle();
        readback_cmd(a2);
        repeat (400) @(negedge clk_rx);
        tx_ready = 1;
        take_frame(a, m);
        take_frame(a2, m);
        j++;
      end else begin
        take_frame(a, m);
      end
    end
    t2 = $time;
    get_mac(h_prv);
    h_vrf = m.finish();
    checks++;
    if (h_prv !== h_vrf) begin failures++; $display("FAIL H_Prv %h != H_Vrf %h", h_prv, h_vrf); end
    else if (((NF + extra) * FW) % 4 == 0) n_fin_k1++;
    else n_fin_k2++;
    d = masked_diffs();
    checks++;
    if (expect_clean ? (d != 0) : (d == 0)) begin
      failures++; $display("FAIL masked comparison: %0d differing words", d);
    end
    $display("phases: configuration %0t, read-back %0t, checksum %0t", t1 - t0, t2 - t1, $time - t2);
    $display("round: start %0d, %0d frames read, masked differences %0d, MAC %h", start, NF + extra, d, h_prv);
  endtask

  initial begin
    // Boot image: static frames hold the static configuration, dynamic
    // frames hold whatever an adversary left there.
    for (int f = 0; f < NF; f++) for (int k = 0; k < FW; k++) begin
      logic [31:0] w;
      w = 32'(f * 32'h0101_0101) ^ 32'(k * 32'h2545_F491) ^ 32'h5A5A_0000;
      golden[f * FW + k] = w;
      cm.mem[f * FW + k] = (f >= NF - NDYN) ? ~w : w;
    end
    repeat (4) @(negedge clk_icap);
    rst_rx_n = 1; rst_tx_n = 1; rst_icap_n = 1;
    repeat (4) @(negedge clk_icap);

    attest($urandom_range(0, NF - 1), 0, 64'h0123_4567_89AB_CDEF, 1, 1, ROUND2);
    if (ROUND2) begin
      // Adversary rewrites a static frame behind the verifier's back.
      cm.mem[1 * FW + 3] = ~cm.mem[1 * FW + 3];
      attest($urandom_range(0, NF - 1), 2, 64'hFEDC_BA98_7654_3210, 1, 0, 0);
    end

    checks++;
    if (cm.frames_written != n_cfg) begin failures++; $display("FAIL frames written %0d/%0d", cm.frames_written, n_cfg); end
    $display("mechanisms: configs %0d readbacks %0d mac_init %0d final_k1 %0d final_k2 %0d drops %0d stall_cycles %0d",
             n_cfg, n_rb, n_init, n_fin_k1, n_fin_k2, n_drop, n_stall);
    checks++;
    if (n_cfg == 0 || n_rb == 0 || n_init == 0 || n_drop == 0 || (n_fin_k1 + n_fin_k2) == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    if (ROUND2) begin
      checks++;
      if (n_stall == 0 || n_fin_k1 == 0 || n_fin_k2 == 0) begin failures++; $display("FAIL stall/K1/K2 never happened"); end
    end
    $display("simulated time %0t", $time);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NF * 3000 + 200000) @(posedge clk_rx);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
