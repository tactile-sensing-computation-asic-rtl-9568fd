// tb_ring_ctrl: self-checking test of the ring command wrapper with a scripted DLA
// side. Checks instruction writes, the mapping of WR_INPUT packets onto input-word
// address, byte mask and data, that KICK and CLR_RESULT wait for the DLA to be idle
// (holding the packet, ready low), that RD_RESULT turns into a grant-then-data read
// whose value returns in a RESULT packet to the sender, that DONE goes to the chip
// that kicked, and that unknown commands are dropped.
module tb_ring_ctrl;
  import dla_pkg::*;
  import ring_pkg::*;
  localparam int VEC = 8;
  localparam logic [5:0] MY_ID = 6'd4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                in_valid, in_ready, out_valid, out_ready;
  ring_pkt_t           in_pkt, out_pkt;
  logic                ib_wr_en, ina_wr_en, kick, clr, idle, done, rr_req, rr_gnt, rr_valid;
  logic [7:0]          ib_wr_addr, kick_pc, rr_addr;
  logic [39:0]         ib_wr_data;
  logic [5:0]          ina_wr_addr;
  logic [VEC-1:0]      ina_wr_be;
  logic [VEC-1:0][7:0] ina_wr_data;
  logic [2:0]          rr_lane;
  logic [31:0]         rr_data;

  ring_ctrl dut (.clk, .rst_n, .my_id(MY_ID), .in_valid, .in_ready, .in_pkt, .out_valid,
                 .out_ready, .out_pkt, .ib_wr_en, .ib_wr_addr, .ib_wr_data, .ina_wr_en,
                 .ina_wr_addr, .ina_wr_be, .ina_wr_data, .kick, .kick_pc, .clr, .idle, .done,
                 .rr_req, .rr_lane, .rr_addr, .rr_gnt, .rr_valid, .rr_data);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic ring_pkt_t pkt(logic [5:0] src, ring_cmd_e cmd, int addr, logic [39:0] data);
    ring_pkt_t p;
    p.dest = MY_ID; p.src = src; p.cmd = cmd; p.addr = 16'(addr); p.data = data;
    return p;
  endfunction

  // present a packet and wait until it is taken; returns the cycles it waited
  task automatic put(ring_pkt_t p, output int waited);
    @(negedge clk);
    in_valid = 1; in_pkt = p; waited = 0;
    #1;
    while (!in_ready) begin @(negedge clk); waited++; #1; end
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic get(output ring_pkt_t p);
    int t = 0;
    @(negedge clk);
    out_ready = 1;
    while (!out_valid && t < 100) begin @(negedge clk); t++; end
    p = out_pkt;
    chk(out_valid, "expected an output packet");
    @(negedge clk);
    out_ready = 0;
  endtask

  initial begin
    ring_pkt_t p, o;
    int w;
    in_valid = 0; in_pkt = '0; out_ready = 0; idle = 1; done = 0; rr_gnt = 0; rr_valid = 0; rr_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // instruction write
    p = pkt(6'd0, CMD_WR_INSTR, 17, 40'h12_3456_789a);
    @(negedge clk); in_valid = 1; in_pkt = p; #1;
    chk(in_ready && ib_wr_en && ib_wr_addr == 17 && ib_wr_data == 40'h12_3456_789a, "instruction write");
    @(negedge clk); in_valid = 0; #1;
    chk(!ib_wr_en, "single instruction write");

    // input writes: byte address 4*c, packed bytes, mask
    for (int n = 0; n < 50; n++) begin
      automatic int c = $urandom % 128;
      automatic logic [3:0] m = 4'($urandom);
      automatic logic [31:0] d = $urandom;
      automatic bit ok = 1;
      p = pkt(6'd0, CMD_WR_INPUT, 4 * c, {4'h0, m, d});
      @(negedge clk); in_valid = 1; in_pkt = p; #1;
      ok = in_ready && ina_wr_en && ina_wr_addr == 6'(c / 2);
      for (int b = 0; b < VEC; b++) begin
        automatic bit sel = ((b / 4) == (c % 2)) && m[b % 4];
        if (ina_wr_be[b] != sel) ok = 0;
        if (sel && ina_wr_data[b] != d[8*(b%4) +: 8]) ok = 0;
      end
      chk(ok, "input write mapping");
    end
    @(negedge clk); in_valid = 0;

    // KICK waits for idle
    idle = 0;
    fork
      put(pkt(6'd2, CMD_KICK, 33, '0), w);
      begin
        repeat (5) @(negedge clk);
        chk(!kick && !in_ready, "kick held while busy");
        idle = 1; #1;
        chk(kick && kick_pc == 33, "kick issued when idle");
      end
    join
    chk(w >= 4, "kick packet waited");

    // DONE goes to the kicker
    @(negedge clk); done = 1; @(negedge clk); done = 0;
    get(o);
    chk(o.cmd == CMD_DONE && o.dest == 6'd2 && o.src == MY_ID, "DONE packet");

    // RD_RESULT: grant, then data
    for (int n = 0; n < 20; n++) begin
      automatic int lane = $urandom % 8, a = $urandom % 256;
      automatic logic [31:0] v = $urandom;
      automatic logic [5:0] src = 6'($urandom % 60 + 1);
      fork
        put(pkt(src, CMD_RD_RESULT, (lane << 8) | a, '0), w);
        begin
          @(negedge clk); #1;
          while (!rr_req) begin @(negedge clk); #1; end
          chk(rr_lane == 3'(lane) && rr_addr == 8'(a), "read address");
          repeat ($urandom % 3) @(negedge clk);
          @(negedge clk);
          rr_gnt = 1;
          @(negedge clk); rr_gnt = 0; rr_valid = 1; rr_data = v;
          @(negedge clk); rr_valid = 0; rr_data = '0;
        end
      join
      get(o);
      chk(o.cmd == CMD_RESULT && o.dest == src && o.src == MY_ID && o.data[31:0] == v, "RESULT packet");
    end

    // CLR waits for idle too
    idle = 0;
    fork
      put(pkt(6'd0, CMD_CLR_RESULT, 0, '0), w);
      begin
        repeat (3) @(negedge clk);
        chk(!clr, "clear held while busy");
        idle = 1; #1;
        chk(clr, "clear issued");
      end
    join

    // unknown command is dropped
    p = pkt(6'd0, CMD_RESULT, 0, '0);
    @(negedge clk); in_valid = 1; in_pkt = p; #1;
    chk(in_ready && !ib_wr_en && !ina_wr_en && !kick && !clr && !rr_req, "unknown command dropped");
    @(negedge clk); in_valid = 0;
    repeat (3) @(negedge clk);
    chk(!out_valid, "nothing sent for a dropped command");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
