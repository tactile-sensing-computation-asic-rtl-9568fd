// tb_chip_pipeline: two compute chips on one ring, each running one layer of a
// two-layer network, at default sizes. This is the multi-chip arrangement in which
// every chip holds its own layer's weights in its own flash. The ring runs
//   testbench (control chip, id 0) -> chip A (id 1) -> chip B (id 2) -> testbench.
// Packets for chip B therefore pass through chip A. Replies from chip A pass through
// chip B on their way back.
//
// Each chip first runs a load program that fetches its weights once. Then, for every
// frame, the testbench:
//   1. streams the frame into chip A and kicks it (layer 1: a P1-word dot product,
//      ReLU after requantization);
//   2. reads layer 1's eight int8 outputs from chip A;
//   3. writes them as one input word into chip B and kicks it (layer 2: a one-word
//      dot product, requantized to int8);
//   4. reads chip B's outputs.
// Step 1 for frame t+1 is issued right after step 3 for frame t, so both chips
// compute at the same time. The RD_RESULT packets for chip B are queued behind its
// KICK. They stall chip B's ring input until B's run ends, which also holds up
// chip A's replies.
//
// Every output is checked against a reference. The testbench counts the mechanisms
// used: packets forwarded by each chip, cycles in which both chips computed, and
// ring stalls. Any count that stays zero is a failure.
module tb_chip_pipeline;
  import dla_pkg::*;
  import ring_pkg::*;
  import dla_tb_pkg::*;
  localparam int LANES = 8, VEC = 8, T = 4;
  localparam int P1 = 4, SH1 = 10, P2 = 1, SH2 = 9;
  localparam int FB_A = 'h100, FB_B = 'h900;
  localparam int PC_LOAD = 0, PC_FRAME = 32;
  localparam logic [5:0] CTRL_ID = 6'd0, ID_A = 6'd1, ID_B = 6'd2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // ring segments: s0 testbench->A, s1 A->B, s2 B->testbench
  logic      v0, r0, v1, r1, v2, r2, in_fire;
  ring_pkt_t p0, p1, p2;
  logic      busy_a, busy_b;

  logic        cyc_a, stb_a, we_a, ack_a, cyc_b, stb_b, we_b, ack_b;
  logic [31:0] adr_a, dato_a, dati_a, adr_b, dato_b, dati_b;
  logic [3:0]  sel_a, sel_b;
  int          reads_a, reads_b;

  dla_chip chip_a (.clk, .rst_n, .my_id(ID_A),
                   .ring_in_valid(v0), .ring_in_ready(r0), .ring_in_pkt(p0),
                   .ring_out_valid(v1), .ring_out_ready(r1), .ring_out_pkt(p1),
                   .busy(busy_a), .wb_cyc_o(cyc_a), .wb_stb_o(stb_a), .wb_we_o(we_a),
                   .wb_adr_o(adr_a), .wb_sel_o(sel_a), .wb_dat_o(dato_a),
                   .wb_dat_i(dati_a), .wb_ack_i(ack_a));
  dla_chip chip_b (.clk, .rst_n, .my_id(ID_B),
                   .ring_in_valid(v1), .ring_in_ready(r1), .ring_in_pkt(p1),
                   .ring_out_valid(v2), .ring_out_ready(r2), .ring_out_pkt(p2),
                   .busy(busy_b), .wb_cyc_o(cyc_b), .wb_stb_o(stb_b), .wb_we_o(we_b),
                   .wb_adr_o(adr_b), .wb_sel_o(sel_b), .wb_dat_o(dato_b),
                   .wb_dat_i(dati_b), .wb_ack_i(ack_b));
  wb_flash_model #(.MAX_WAIT(2)) flash_a (.clk, .rst_n, .cyc(cyc_a), .stb(stb_a), .we(we_a),
                                          .adr(adr_a), .dat(dati_a), .ack(ack_a), .reads(reads_a));
  wb_flash_model #(.MAX_WAIT(2)) flash_b (.clk, .rst_n, .cyc(cyc_b), .stb(stb_b), .we(we_b),
                                          .adr(adr_b), .dat(dati_b), .ack(ack_b), .reads(reads_b));

  ring_pkt_t tx_q[$], rx_a[$], rx_b[$];
  int        done_a = 0, done_b = 0;
  int        n_fwd_a = 0, n_fwd_b = 0, n_overlap = 0, n_stall = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) in_fire <= v0 && r0;
  always @(negedge clk) begin
    if (!rst_n) v0 <= 1'b0;
    else begin
      if (in_fire) void'(tx_q.pop_front());
      v0 <= tx_q.size() > 0;
      if (tx_q.size() > 0) p0 <= tx_q[0];
      r2 <= ($urandom % 4) != 0;
    end
  end
  always @(posedge clk) begin
    if (rst_n) begin
      if (v2 && r2) begin
        if (p2.dest != CTRL_ID) begin failures++; $display("packet for %0d came back", p2.dest); end
        else if (p2.cmd == CMD_DONE && p2.src == ID_A) done_a++;
        else if (p2.cmd == CMD_DONE && p2.src == ID_B) done_b++;
        else if (p2.src == ID_A) rx_a.push_back(p2);
        else rx_b.push_back(p2);
      end
      if (v0 && r0 && p0.dest != ID_A) n_fwd_a++;
      if (v1 && r1 && p1.dest != ID_B) n_fwd_b++;
      if (busy_a && busy_b) n_overlap++;
      if ((v0 && !r0) || (v1 && !r1)) n_stall++;
    end
  end

  function automatic ring_pkt_t pkt(logic [5:0] dest, ring_cmd_e cmd, int addr, logic [39:0] data);
    ring_pkt_t p;
    p.dest = dest; p.src = CTRL_ID; p.cmd = cmd; p.addr = 16'(addr); p.data = data;
    return p;
  endfunction

  // Weight k (0 .. p*VEC-1) of lane l for a layer whose rows start at flash byte fb.
  function automatic longint w(int fb, int p, int l, int k);
    return longint'($signed(flash_byte(32'(fb + l * p * VEC + k))));
  endfunction

  // Load program (p rows per lane from fb) and frame program (p-word dot product,
  // last step through SFU function fn with shift sh), each ending in HALT.
  function automatic void layer(int fb, int p, int fn, int sh, ref instr_t pl[$], ref instr_t pf[$]);
    pl.delete(); pf.delete();
    pl.push_back(mk_instr(OP_LDI, 0, 0, 3'd0, 3'd0, 27'(fb)));
    pl.push_back(mk_instr(OP_LDI, 0, 0, 3'd1, 3'd0, 27'd0));
    for (int l = 0; l < LANES; l++) begin
      pl.push_back(mk_instr(OP_WLOAD, 0, 0, 3'd0, 3'd1, 27'((l << 12) | p)));
      pl.push_back(mk_instr(OP_ADDI, 0, 0, 3'd0, 3'd0, 27'(p * VEC)));
    end
    pl.push_back(mk_instr(OP_HALT, 0, 0, 3'd0, 3'd0, 27'd0));
    for (int k = 0; k < p; k++) begin
      pf.push_back(mk_instr(OP_LDI, 0, 0, 3'd2, 3'd0, 27'(k)));
      pf.push_back(mk_instr(OP_DOT, k > 0, 0, 3'd2, 3'd2,
                            27'(k == p - 1 ? ((sh << 11) | (fn << 8)) : (int'(SFU_PASS) << 8))));
    end
    pf.push_back(mk_instr(OP_HALT, 0, 0, 3'd0, 3'd0, 27'd0));
  endfunction

  task automatic load(logic [5:0] dest, int base, instr_t prog[$]);
    foreach (prog[i]) tx_q.push_back(pkt(dest, CMD_WR_INSTR, base + i, prog[i]));
  endtask

  task automatic wait_cond(ref int cnt, input int want, input string what);
    automatic int t = 0;
    while (cnt < want && t < 60000) begin @(posedge clk); t++; end
    checks++;
    if (cnt < want) begin failures++; $display("timeout waiting for %s", what); end
  endtask

  task automatic wait_rx(ref ring_pkt_t q[$], input int n, input string what);
    automatic int t = 0;
    while (q.size() < n && t < 60000) begin @(posedge clk); t++; end
    checks++;
    if (q.size() < n) begin failures++; $display("timeout waiting for %s results", what); end
  endtask

  task automatic send_frame(logic [7:0] x[$]);
    tx_q.push_back(pkt(ID_A, CMD_CLR_RESULT, 0, '0));
    for (int c = 0; c < P1 * VEC / 4; c++)
      tx_q.push_back(pkt(ID_A, CMD_WR_INPUT, 4 * c, {4'h0, 4'hf, x[4*c+3], x[4*c+2], x[4*c+1], x[4*c]}));
    tx_q.push_back(pkt(ID_A, CMD_KICK, PC_FRAME, '0));
    for (int l = 0; l < LANES; l++) tx_q.push_back(pkt(ID_A, CMD_RD_RESULT, l << 8, '0));
  endtask

  initial begin
    instr_t pla[$], pfa[$], plb[$], pfb[$];
    logic [7:0] x[T][$];
    logic [7:0] h[$];
    longint e1[LANES], e2[T][LANES];
    int reads_after_load_a, reads_after_load_b, nb;
    p0 = '0; r2 = 0; nb = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // frames and reference outputs
    for (int t = 0; t < T; t++) begin
      for (int k = 0; k < P1 * VEC; k++) x[t].push_back(8'($urandom));
      for (int l = 0; l < LANES; l++) begin
        automatic longint s = 0;
        for (int k = 0; k < P1 * VEC; k++) s += longint'($signed(x[t][k])) * w(FB_A, P1, l, k);
        e1[l] = ref_sfu(s, int'(SFU_RELU), SH1);
      end
      for (int l = 0; l < LANES; l++) begin
        automatic longint s = 0;
        for (int j = 0; j < VEC; j++) s += e1[j] * w(FB_B, P2, l, j);
        e2[t][l] = ref_sfu(s, int'(SFU_REQ), SH2);
      end
    end

    layer(FB_A, P1, int'(SFU_RELU), SH1, pla, pfa);
    layer(FB_B, P2, int'(SFU_REQ), SH2, plb, pfb);
    load(ID_A, PC_LOAD, pla);
    load(ID_A, PC_FRAME, pfa);
    load(ID_B, PC_LOAD, plb);
    load(ID_B, PC_FRAME, pfb);
    tx_q.push_back(pkt(ID_A, CMD_KICK, PC_LOAD, '0));
    tx_q.push_back(pkt(ID_B, CMD_KICK, PC_LOAD, '0));
    wait_cond(done_a, 1, "chip A load");
    wait_cond(done_b, 1, "chip B load");
    reads_after_load_a = reads_a;
    reads_after_load_b = reads_b;
    checks++;
    if (reads_a != LANES * P1 * VEC / 4 || reads_b != LANES * P2 * VEC / 4) begin
      failures++; $display("flash reads A=%0d B=%0d", reads_a, reads_b);
    end

    send_frame(x[0]);
    for (int t = 0; t < T; t++) begin
      // layer 1 output of frame t
      wait_rx(rx_a, LANES, "chip A");
      h.delete();
      for (int l = 0; l < LANES; l++) begin
        automatic ring_pkt_t p = rx_a.pop_front();
        automatic longint e = 0;
        // recompute layer 1 for this frame
        for (int k = 0; k < P1 * VEC; k++) e += longint'($signed(x[t][k])) * w(FB_A, P1, l, k);
        e = ref_sfu(e, int'(SFU_RELU), SH1);
        checks++;
        if (p.cmd != CMD_RESULT || longint'($signed(p.data[31:0])) != e) begin
          failures++; $display("frame %0d layer 1 lane %0d: got %0d exp %0d", t, l, $signed(p.data[31:0]), e);
        end
        h.push_back(p.data[7:0]);
      end
      // hand layer 1's output to chip B and start it, then start chip A on the next frame
      tx_q.push_back(pkt(ID_B, CMD_CLR_RESULT, 0, '0));
      tx_q.push_back(pkt(ID_B, CMD_WR_INPUT, 0, {4'h0, 4'hf, h[3], h[2], h[1], h[0]}));
      tx_q.push_back(pkt(ID_B, CMD_WR_INPUT, 4, {4'h0, 4'hf, h[7], h[6], h[5], h[4]}));
      tx_q.push_back(pkt(ID_B, CMD_KICK, PC_FRAME, '0));
      for (int l = 0; l < LANES; l++) tx_q.push_back(pkt(ID_B, CMD_RD_RESULT, l << 8, '0));
      if (t + 1 < T) send_frame(x[t + 1]);
      // layer 2 output of frame t
      wait_rx(rx_b, LANES, "chip B");
      for (int l = 0; l < LANES; l++) begin
        automatic ring_pkt_t p = rx_b.pop_front();
        checks++;
        if (p.cmd != CMD_RESULT || longint'($signed(p.data[31:0])) != e2[t][l]) begin
          failures++; $display("frame %0d layer 2 lane %0d: got %0d exp %0d", t, l, $signed(p.data[31:0]), e2[t][l]);
        end
        if ($signed(p.data[31:0]) > -128 && $signed(p.data[31:0]) < 127) nb++;
      end
    end
    wait_cond(done_a, T + 1, "chip A frames");
    wait_cond(done_b, T + 1, "chip B frames");

    checks++;
    if (reads_a != reads_after_load_a || reads_b != reads_after_load_b) begin
      failures++; $display("weights were reloaded during frames");
    end
    checks++;
    if (rx_a.size() != 0 || rx_b.size() != 0) begin failures++; $display("unexpected extra results"); end
    checks += 4;
    if (n_fwd_a == 0) begin failures++; $display("chip A forwarded nothing"); end
    if (n_fwd_b == 0) begin failures++; $display("chip B forwarded nothing"); end
    if (n_overlap == 0) begin failures++; $display("the chips never computed at the same time"); end
    if (n_stall == 0) begin failures++; $display("the ring never stalled"); end
    checks++;
    if (nb == 0) begin failures++; $display("every layer 2 output saturated"); end
    $display("frames=%0d forwarded by A=%0d by B=%0d overlap cycles=%0d stall cycles=%0d unsaturated=%0d",
             T, n_fwd_a, n_fwd_b, n_overlap, n_stall, nb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
