// tb_frame_loop: the chip's per-frame operating loop, through the ring, at default
// sizes. The weights are loaded once by a load program. The hidden state (input
// memory B word 0) is zeroed by a second program. Then, for each of T frames, the
// testbench acts as the control chip:
//   1. it resets the result buffer;
//   2. it streams the frame's sensor bytes in;
//   3. it kicks the frame program and waits for DONE;
//   4. it reads the eight int8 outputs.
// The frame program computes a recurrent layer,
//   h_t = hardtanh(requant(W x_t + U h_{t-1})),
// where the input part is accumulated over P words of input memory A and the
// recurrent part is one word of input memory B. It then copies h_t into input
// memory B for the next frame. Every output is checked against a reference model
// that carries its own state. Also counts the mechanisms used (weight loads only in
// the load program, accumulation of A and B into one entry, ping-pong swaps).
module tb_frame_loop;
  import dla_pkg::*;
  import ring_pkg::*;
  import dla_tb_pkg::*;
  localparam int LANES = 8, VEC = 8, P = 4, T = 5, SH = 11;
  localparam int PC_LOAD = 0, PC_ZERO = 40, PC_FRAME = 64;
  localparam logic [5:0] MY_ID = 6'd1, CTRL_ID = 6'd0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        in_valid, in_ready, out_valid, out_ready, busy, in_fire;
  ring_pkt_t   in_pkt, out_pkt;
  logic        cyc, stb, we, ack;
  logic [31:0] adr, dat_o, dat_i;
  logic [3:0]  sel;
  int          reads;

  dla_chip dut (.clk, .rst_n, .my_id(MY_ID),
                .ring_in_valid(in_valid), .ring_in_ready(in_ready), .ring_in_pkt(in_pkt),
                .ring_out_valid(out_valid), .ring_out_ready(out_ready), .ring_out_pkt(out_pkt),
                .busy, .wb_cyc_o(cyc), .wb_stb_o(stb), .wb_we_o(we), .wb_adr_o(adr),
                .wb_sel_o(sel), .wb_dat_o(dat_o), .wb_dat_i(dat_i), .wb_ack_i(ack));
  wb_flash_model #(.MAX_WAIT(1)) flash (.clk, .rst_n, .cyc, .stb, .we, .adr, .dat(dat_i), .ack, .reads);

  ring_pkt_t tx_q[$], rx_q[$];
  int        n_done = 0, n_ab_accum = 0, n_swap = 0, n_linear = 0;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) in_fire <= in_valid && in_ready;
  always @(negedge clk) begin
    if (!rst_n) in_valid <= 1'b0;
    else begin
      if (in_fire) void'(tx_q.pop_front());
      in_valid <= tx_q.size() > 0;
      if (tx_q.size() > 0) in_pkt <= tx_q[0];
      out_ready <= ($urandom % 2) != 0;
    end
  end
  always @(posedge clk) begin
    if (rst_n) begin
      if (out_valid && out_ready) begin
        if (out_pkt.cmd == CMD_DONE) n_done++;
        else rx_q.push_back(out_pkt);
      end
      if (dut.u_dla.u_ctrl.inb_rd_en && dut.u_dla.u_ctrl.ins.mode0) n_ab_accum++;
      if (dut.u_dla.u_ctrl.ina_swap) n_swap++;
    end
  end

  function automatic ring_pkt_t pkt(ring_cmd_e cmd, int addr, logic [39:0] data);
    ring_pkt_t p;
    p.dest = MY_ID; p.src = CTRL_ID; p.cmd = cmd; p.addr = 16'(addr); p.data = data;
    return p;
  endfunction

  task automatic load(int base, instr_t prog[$]);
    foreach (prog[i]) tx_q.push_back(pkt(CMD_WR_INSTR, base + i, prog[i]));
  endtask

  task automatic kick_wait(int pc);
    automatic int want = n_done + 1, t = 0;
    tx_q.push_back(pkt(CMD_KICK, pc, '0));
    while (n_done < want && t < 50000) begin @(posedge clk); t++; end
    checks++;
    if (n_done < want) begin failures++; $display("no DONE after kick at %0d", pc); end
  endtask

  initial begin
    instr_t pl[$], pz[$], pf[$];
    logic [7:0] x[$];
    longint h[LANES], hn[LANES];
    int loop_pc, wl_reads;
    in_pkt = '0; out_ready = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // load program: (P+1) rows per lane, row P holds U
    pl.push_back(mk_instr(OP_LDI, 0, 0, 3'd0, 3'd0, 27'(FBASE)));
    pl.push_back(mk_instr(OP_LDI, 0, 0, 3'd1, 3'd0, 27'd0));
    for (int l = 0; l < LANES; l++) begin
      pl.push_back(mk_instr(OP_WLOAD, 0, 0, 3'd0, 3'd1, 27'((l << 12) | (P + 1))));
      pl.push_back(mk_instr(OP_ADDI, 0, 0, 3'd0, 3'd0, 27'((P + 1) * VEC)));
    end
    pl.push_back(mk_instr(OP_HALT, 0, 0, 3'd0, 3'd0, 27'd0));
    // zero-state program: copy the (cleared) entry 0 of every lane into input B word 0
    pz.push_back(mk_instr(OP_LDI, 0, 0, 3'd5, 3'd0, 27'd0));
    pz.push_back(mk_instr(OP_COPY, 0, 0, 3'd5, 3'd0, 27'd0));
    pz.push_back(mk_instr(OP_HALT, 0, 0, 3'd0, 3'd0, 27'd0));
    // frame program
    pf.push_back(mk_instr(OP_LDI, 0, 0, 3'd2, 3'd0, 27'd0));
    pf.push_back(mk_instr(OP_LDI, 0, 0, 3'd3, 3'd0, 27'd0));
    pf.push_back(mk_instr(OP_DOT, 0, 0, 3'd2, 3'd3, 27'(SFU_PASS << 8)));
    pf.push_back(mk_instr(OP_LDI, 0, 0, 3'd4, 3'd0, 27'(P - 1)));
    loop_pc = PC_FRAME + pf.size();
    pf.push_back(mk_instr(OP_ADDI, 0, 0, 3'd2, 3'd2, 27'd1));
    pf.push_back(mk_instr(OP_ADDI, 0, 0, 3'd3, 3'd3, 27'd1));
    pf.push_back(mk_instr(OP_DOT, 1, 0, 3'd2, 3'd3, 27'(SFU_PASS << 8)));
    pf.push_back(mk_instr(OP_ADDI, 0, 0, 3'd4, 3'd4, 27'h7ffffff));
    pf.push_back(mk_instr(OP_BNZ, 0, 0, 3'd4, 3'd0, 27'(loop_pc)));
    pf.push_back(mk_instr(OP_LDI, 0, 0, 3'd5, 3'd0, 27'd0));
    pf.push_back(mk_instr(OP_LDI, 0, 0, 3'd6, 3'd0, 27'(P)));
    pf.push_back(mk_instr(OP_DOT, 1, 1, 3'd5, 3'd6, 27'((SH << 11) | (SFU_TANH << 8))));
    pf.push_back(mk_instr(OP_COPY, 0, 0, 3'd5, 3'd0, 27'd0));
    pf.push_back(mk_instr(OP_HALT, 0, 0, 3'd0, 3'd0, 27'd0));
    load(PC_LOAD, pl);
    load(PC_ZERO, pz);
    load(PC_FRAME, pf);

    kick_wait(PC_LOAD);
    wl_reads = reads;
    checks++;
    if (reads != LANES * (P + 1) * VEC / 4) begin failures++; $display("%0d flash reads in the load", reads); end
    tx_q.push_back(pkt(CMD_CLR_RESULT, 0, '0));
    kick_wait(PC_ZERO);
    for (int l = 0; l < LANES; l++) h[l] = 0;

    for (int t = 0; t < T; t++) begin
      x.delete();
      for (int k = 0; k < P * VEC; k++) x.push_back(8'($urandom));
      tx_q.push_back(pkt(CMD_CLR_RESULT, 0, '0));
      for (int c = 0; c < P * VEC / 4; c++)
        tx_q.push_back(pkt(CMD_WR_INPUT, 4 * c, {4'h0, 4'hf, x[4*c+3], x[4*c+2], x[4*c+1], x[4*c]}));
      kick_wait(PC_FRAME);
      for (int l = 0; l < LANES; l++) tx_q.push_back(pkt(CMD_RD_RESULT, l << 8, '0));
      // reference
      for (int l = 0; l < LANES; l++) begin
        automatic longint s = 0;
        for (int k = 0; k < P * VEC; k++) s += longint'($signed(x[k])) * wgt(LANES, VEC, P, l, k);
        for (int j = 0; j < VEC; j++) s += h[j] * wgt(LANES, VEC, P, l, P * VEC + j);
        hn[l] = ref_sfu(s, 4, SH);
      end
      h = hn;
      begin
        automatic int w = 0;
        while (rx_q.size() < LANES && w < 20000) begin @(posedge clk); w++; end
      end
      for (int l = 0; l < LANES; l++) begin
        ring_pkt_t p;
        checks++;
        if (rx_q.size() == 0) begin failures++; $display("frame %0d: result missing", t); continue; end
        p = rx_q.pop_front();
        if ($signed(p.data[31:0]) > -64 && $signed(p.data[31:0]) < 64) n_linear++;
        if (p.cmd != CMD_RESULT || longint'($signed(p.data[31:0])) != h[l]) begin
          failures++;
          $display("frame %0d lane %0d: got %0d exp %0d", t, l, $signed(p.data[31:0]), h[l]);
        end
      end
    end
    checks += 3;
    if (reads != wl_reads) begin failures++; $display("weights were reloaded during frames"); end
    if (n_ab_accum != T) begin failures++; $display("%0d A+B accumulations, expected %0d", n_ab_accum, T); end
    if (n_swap != T + 2) begin failures++; $display("%0d bank swaps", n_swap); end
    checks++;
    if (n_linear == 0) begin failures++; $display("every output saturated"); end
    $display("frames=%0d A+B accumulations=%0d bank swaps=%0d unsaturated outputs=%0d", T, n_ab_accum, n_swap, n_linear);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
