// tb_dla_chip: end-to-end test of the chip through its ring ports, at the default
// sizes (no parameter overrides). The testbench plays the control chip (ring id 0)
// and the rest of the ring; the chip has id 3 and the flash model hangs on its
// Wishbone bus. Sequence:
//   1. write the test program (dla_tb_pkg) with WR_INSTR packets and input frame 1
//      with WR_INPUT packets (four packed bytes each), then KICK;
//   2. while the program runs, write frame 2 (into the other ping-pong bank) and send
//      packets addressed to chip 5, which must come out on ring_out unchanged;
//   3. on DONE, read all results with RD_RESULT and compare with the reference;
//   4. KICK again followed at once by RD_RESULT packets, which stall the ring until
//      the run ends, and check frame 2's results;
//   5. CLR_RESULT and read back zeros.
// It counts how often each mechanism occurred (forwarding, ring stall, ping-pong
// write during a run, arbitration between forwarded and local packets, output
// back-pressure, weight loads, accumulate, input-B use, clearing) and counts a
// failure for any that never did.
module tb_dla_chip;
  import dla_pkg::*;
  import ring_pkg::*;
  import dla_tb_pkg::*;
  localparam int LANES = 8, VEC = 8, P = 6;
  localparam int FN = 1, SH = 9, SH2 = 6;
  localparam logic [5:0] MY_ID = 6'd3, CTRL_ID = 6'd0, OTHER_ID = 6'd5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       in_valid, in_ready, out_valid, out_ready, busy;
  ring_pkt_t  in_pkt, out_pkt;
  logic       cyc, stb, we, ack;
  logic [31:0] adr, dat_o, dat_i;
  logic [3:0] sel;
  int         reads;

  dla_chip dut (.clk, .rst_n, .my_id(MY_ID),
                .ring_in_valid(in_valid), .ring_in_ready(in_ready), .ring_in_pkt(in_pkt),
                .ring_out_valid(out_valid), .ring_out_ready(out_ready), .ring_out_pkt(out_pkt),
                .busy, .wb_cyc_o(cyc), .wb_stb_o(stb), .wb_we_o(we), .wb_adr_o(adr),
                .wb_sel_o(sel), .wb_dat_o(dat_o), .wb_dat_i(dat_i), .wb_ack_i(ack));
  wb_flash_model #(.MAX_WAIT(2)) flash (.clk, .rst_n, .cyc, .stb, .we, .adr, .dat(dat_i), .ack, .reads);

  // mechanism counters
  int n_forward = 0, n_stall = 0, n_pingpong = 0, n_arb = 0, n_backpressure = 0;
  int n_wload = 0, n_accum = 0, n_inb = 0, n_clear = 0, n_done = 0;

  ring_pkt_t  tx_q[$];
  ring_pkt_t  fwd_exp[$];
  ring_pkt_t  results[$];
  instr_t     prog[$];
  logic [7:0] frame1[$], frame2[$];
  longint     r0[$], r1[$];

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic ring_pkt_t pkt(logic [5:0] dest, ring_cmd_e cmd, int addr, logic [39:0] data);
    ring_pkt_t p;
    p.dest = dest; p.src = CTRL_ID; p.cmd = cmd; p.addr = 16'(addr); p.data = data;
    return p;
  endfunction

  // ring input driver: a packet moves at a rising edge where valid and ready are
  // both high; the queue is updated at the following falling edge.
  logic in_fire;
  always @(posedge clk) in_fire <= in_valid && in_ready;
  always @(negedge clk) begin
    if (!rst_n) begin
      in_valid <= 1'b0;
    end else begin
      if (in_fire) void'(tx_q.pop_front());
      in_valid <= tx_q.size() > 0;
      if (tx_q.size() > 0) in_pkt <= tx_q[0];
    end
  end

  // ring output monitor
  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid && !in_ready) n_stall++;
      if (out_valid && !out_ready) n_backpressure++;
      if (dut.u_node.fwd_req && dut.u_node.local_in_valid && dut.u_node.out_free) n_arb++;
      if (dut.u_dla.u_ctrl.state == dut.u_dla.u_ctrl.S_W_WRITE) n_wload++;
      if (dut.u_dla.u_ctrl.acc_wr_en && dut.u_dla.u_ctrl.acc_en && !dut.u_dla.u_ctrl.acc_wr_zero) n_accum++;
      if (dut.u_dla.u_ctrl.inb_rd_en) n_inb++;
      if (dut.u_dla.u_ctrl.acc_wr_zero) n_clear++;
      if (dut.u_dla.ina_wr_en && busy) n_pingpong++;
      if (out_valid && out_ready) begin
        if (out_pkt.dest == OTHER_ID) begin
          ring_pkt_t e;
          n_forward++;
          checks++;
          e = fwd_exp.pop_front();
          if (out_pkt != e) begin failures++; $display("forwarded packet changed or out of order"); end
        end else if (out_pkt.dest == CTRL_ID && out_pkt.cmd == CMD_DONE) begin
          n_done++;
          checks++;
          if (out_pkt.src != MY_ID) begin failures++; $display("DONE from wrong id"); end
        end else if (out_pkt.dest == CTRL_ID && out_pkt.cmd == CMD_RESULT) begin
          results.push_back(out_pkt);
        end else begin
          failures++;
          $display("unexpected packet on ring_out: dest %0d cmd %0d", out_pkt.dest, out_pkt.cmd);
        end
      end
    end
  end
  always @(negedge clk) out_ready <= ($urandom % 4) != 0;

  task automatic send_frame(ref logic [7:0] f[$]);
    f.delete();
    for (int k = 0; k < P * VEC; k++) f.push_back(8'($urandom));
    for (int c = 0; c < P * VEC / 4; c++) begin
      logic [39:0] d;
      d = {4'h0, 4'hf, f[4*c+3], f[4*c+2], f[4*c+1], f[4*c]};
      tx_q.push_back(pkt(MY_ID, CMD_WR_INPUT, 4 * c, d));
    end
  endtask

  task automatic send_forward(int n);
    for (int i = 0; i < n; i++) begin
      ring_pkt_t p;
      p = pkt(OTHER_ID, ring_cmd_e'($urandom % 8), $urandom, {$urandom, 8'($urandom)});
      p.src = 6'd7;
      tx_q.push_back(p);
      fwd_exp.push_back(p);
    end
  endtask

  // with_fwd: put forwarded packets between the reads, so that result packets and
  // forwarded ones compete for ring_out
  task automatic request_results(bit with_fwd);
    for (int l = 0; l < LANES; l++) begin
      tx_q.push_back(pkt(MY_ID, CMD_RD_RESULT, (l << 8) | 0, '0));
      if (with_fwd) send_forward(2);
      tx_q.push_back(pkt(MY_ID, CMD_RD_RESULT, (l << 8) | 1, '0));
      if (with_fwd) send_forward(2);
    end
  endtask

  task automatic check_results(string tag);
    int t = 0;
    while (results.size() < 2 * LANES && t < 20000) begin @(posedge clk); t++; end
    for (int l = 0; l < LANES; l++) begin
      for (int a = 0; a < 2; a++) begin
        ring_pkt_t p;
        longint e = (a == 0) ? r0[l] : r1[l];
        checks++;
        if (results.size() == 0) begin failures++; $display("%s: missing result", tag); continue; end
        p = results.pop_front();
        if (p.src != MY_ID || longint'($signed(p.data[31:0])) != e) begin
          failures++;
          $display("%s lane %0d entry %0d: got %0d exp %0d", tag, l, a, $signed(p.data[31:0]), e);
        end
      end
    end
  endtask

  task automatic wait_done(int n);
    int t = 0;
    while (n_done < n && t < 100000) begin @(posedge clk); t++; end
    checks++;
    if (n_done < n) begin failures++; $display("no DONE packet"); end
  endtask

  initial begin
    in_pkt = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    build_program(LANES, VEC, P, FN, SH, SH2, prog);
    for (int i = 0; i < prog.size(); i++) tx_q.push_back(pkt(MY_ID, CMD_WR_INSTR, i, prog[i]));
    send_frame(frame1);
    tx_q.push_back(pkt(MY_ID, CMD_KICK, 0, '0));
    while (!busy) @(posedge clk);
    send_frame(frame2);
    send_forward(200);
    wait_done(1);

    expected(LANES, VEC, P, FN, SH, SH2, frame1, r0, r1);
    request_results(1'b0);
    check_results("frame 1");

    tx_q.push_back(pkt(MY_ID, CMD_KICK, 0, '0));
    request_results(1'b1);
    wait_done(2);
    expected(LANES, VEC, P, FN, SH, SH2, frame2, r0, r1);
    check_results("frame 2");

    tx_q.push_back(pkt(MY_ID, CMD_CLR_RESULT, 0, '0));
    request_results(1'b0);
    r0.delete(); r1.delete();
    for (int l = 0; l < LANES; l++) begin r0.push_back(0); r1.push_back(0); end
    check_results("cleared");

    checks++;
    if (fwd_exp.size() != 0) begin failures++; $display("%0d forwarded packets lost", fwd_exp.size()); end
    checks++;
    if (reads != 2 * LANES * (P + 1) * VEC / 4) begin failures++; $display("%0d flash reads", reads); end

    $display("mechanisms: forward=%0d stall=%0d pingpong=%0d arbitration=%0d backpressure=%0d",
             n_forward, n_stall, n_pingpong, n_arb, n_backpressure);
    $display("            weight_rows=%0d accumulate=%0d input_b=%0d clear=%0d done=%0d",
             n_wload, n_accum, n_inb, n_clear, n_done);
    if (n_forward == 0)      begin failures++; $display("no packet was forwarded"); end
    if (n_stall == 0)        begin failures++; $display("the ring never stalled"); end
    if (n_pingpong == 0)     begin failures++; $display("no input written during a run"); end
    if (n_arb == 0)          begin failures++; $display("no arbitration conflict"); end
    if (n_backpressure == 0) begin failures++; $display("no output back-pressure"); end
    if (n_wload == 0)        begin failures++; $display("no weight row loaded"); end
    if (n_accum == 0)        begin failures++; $display("no accumulating DOT"); end
    if (n_inb == 0)          begin failures++; $display("input memory B never read"); end
    if (n_clear == 0)        begin failures++; $display("result buffer never cleared"); end
    checks += 9;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
