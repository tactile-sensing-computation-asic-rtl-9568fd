// tb_ring_node: self-checking test of the ring node. Random packets arrive on
// ring_in (some for this chip's id, most for others) while the chip injects its own
// packets on local_in, with random ready on both outputs. Checks that packets for
// this chip leave on local_out and all others on ring_out, unchanged, in order and
// none lost; that a waiting local packet is not starved; and that each packet's
// ring_out copy stays put while ring_out is not ready.
module tb_ring_node;
  import ring_pkg::*;
  localparam logic [5:0] MY_ID = 6'd9;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic      ri_v, ri_r, ro_v, ro_r, lo_v, lo_r, li_v, li_r;
  ring_pkt_t ri_p, ro_p, lo_p, li_p;

  ring_node dut (.clk, .rst_n, .my_id(MY_ID),
                 .ring_in_valid(ri_v), .ring_in_ready(ri_r), .ring_in_pkt(ri_p),
                 .ring_out_valid(ro_v), .ring_out_ready(ro_r), .ring_out_pkt(ro_p),
                 .local_out_valid(lo_v), .local_out_ready(lo_r), .local_out_pkt(lo_p),
                 .local_in_valid(li_v), .local_in_ready(li_r), .local_in_pkt(li_p));

  ring_pkt_t exp_local[$], exp_fwd[$], exp_inj[$];
  int        n_in = 0, n_li = 0, wait_li = 0, max_wait_li = 0, conflicts = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic ring_pkt_t rnd_pkt(bit for_me);
    ring_pkt_t p;
    p = {$urandom, $urandom, $urandom};
    p.dest = for_me ? MY_ID : 6'(($urandom % 62) + 10);
    return p;
  endfunction

  // drivers: change at the falling edge, handshakes happen at the rising edge
  always @(negedge clk) begin
    if (rst_n) begin
      lo_r <= ($urandom % 3) != 0;
      ro_r <= ($urandom % 3) != 0;
      if (!ri_v || ri_fire) begin
        ri_v <= (n_in < 2000) && ($urandom % 4 != 0);
        ri_p <= rnd_pkt(($urandom % 4) == 0);
      end
      if (!li_v || li_fire) begin
        li_v <= (n_li < 500) && ($urandom % 2 != 0);
        li_p <= rnd_pkt(1'b0);
      end
    end
  end

  logic ri_fire, li_fire;
  always @(posedge clk) begin
    ri_fire <= 1'b0;
    li_fire <= 1'b0;
    if (rst_n) begin
      if (ri_v && ri_r) begin
        ri_fire <= 1'b1;
        n_in++;
        if (ri_p.dest == MY_ID) exp_local.push_back(ri_p);
        else                    exp_fwd.push_back(ri_p);
      end
      if (li_v && li_r) begin
        li_fire <= 1'b1;
        n_li++;
        exp_inj.push_back(li_p);
        wait_li = 0;
      end else if (li_v) begin
        wait_li++;
        if (wait_li > max_wait_li) max_wait_li = wait_li;
      end
      if (li_v && ri_v && ri_p.dest != MY_ID) conflicts++;
      if (lo_v && lo_r) begin
        checks++;
        if (exp_local.size() == 0 || lo_p != exp_local[0]) begin failures++; $display("local_out packet wrong"); end
        else void'(exp_local.pop_front());
      end
      if (ro_v && ro_r) begin
        checks++;
        if (exp_fwd.size() > 0 && ro_p == exp_fwd[0]) void'(exp_fwd.pop_front());
        else if (exp_inj.size() > 0 && ro_p == exp_inj[0]) void'(exp_inj.pop_front());
        else begin failures++; $display("ring_out packet wrong or out of order"); end
      end
    end
  end

  // a packet on ring_out holds while not accepted
  ring_pkt_t prev_p;
  logic      prev_stall;
  always @(posedge clk) begin
    if (rst_n && prev_stall) begin
      checks++;
      if (!ro_v || ro_p != prev_p) begin failures++; $display("ring_out changed while stalled"); end
    end
    prev_stall <= ro_v && !ro_r;
    prev_p     <= ro_p;
  end

  initial begin
    ri_v = 0; li_v = 0; lo_r = 0; ro_r = 0; ri_p = '0; li_p = '0; prev_stall = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (n_in < 2000 || n_li < 500) @(posedge clk);
    repeat (50) begin @(negedge clk); lo_r = 1; ro_r = 1; end
    checks += 3;
    if (exp_local.size() || exp_fwd.size() || exp_inj.size()) begin
      failures++; $display("packets lost: %0d %0d %0d", exp_local.size(), exp_fwd.size(), exp_inj.size());
    end
    if (conflicts == 0) begin failures++; $display("no arbitration conflict happened"); end
    if (max_wait_li > 20) begin failures++; $display("local packet waited %0d cycles", max_wait_li); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
