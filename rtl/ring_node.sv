// ring_node: a chip's stop on the packet ring.
//
// Packets arrive from the previous chip on ring_in. A packet whose destination id
// equals this chip's id (my_id) leaves on local_out toward the chip's own logic;
// every other packet is forwarded on ring_out toward the next chip. Packets the
// chip itself sends (local_in) are merged into ring_out. When a forwarded packet
// and a local one compete, the grant alternates between them (round robin), so
// neither side starves. ring_out is driven from a one-packet output register;
// local_out is combinational from ring_in. All channels use valid/ready: a packet
// moves in a cycle where both are high. Forwarding to the addressed chip follows
// the chip's description; the arbitration and output register are this design's
// choices. Reset is asynchronous, active low.
module ring_node
  import ring_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic [ID_W-1:0] my_id,
  // from the previous chip
  input  logic            ring_in_valid,
  output logic            ring_in_ready,
  input  ring_pkt_t       ring_in_pkt,
  // to the next chip
  output logic            ring_out_valid,
  input  logic            ring_out_ready,
  output ring_pkt_t       ring_out_pkt,
  // to this chip
  output logic            local_out_valid,
  input  logic            local_out_ready,
  output ring_pkt_t       local_out_pkt,
  // from this chip
  input  logic            local_in_valid,
  output logic            local_in_ready,
  input  ring_pkt_t       local_in_pkt
);

  logic is_local, fwd_req, out_free, grant_fwd, grant_loc, prefer_loc;

  assign is_local  = (ring_in_pkt.dest == my_id);
  assign fwd_req   = ring_in_valid && !is_local;
  assign out_free  = !ring_out_valid || ring_out_ready;

  always_comb begin
    grant_fwd = 1'b0;
    grant_loc = 1'b0;
    if (out_free) begin
      if (fwd_req && local_in_valid) begin
        grant_loc = prefer_loc;
        grant_fwd = !prefer_loc;
      end else begin
        grant_fwd = fwd_req;
        grant_loc = local_in_valid;
      end
    end
  end

  assign local_out_valid = ring_in_valid && is_local;
  assign local_out_pkt   = ring_in_pkt;
  assign ring_in_ready   = is_local ? local_out_ready : grant_fwd;
  assign local_in_ready  = grant_loc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ring_out_valid <= 1'b0;
      ring_out_pkt   <= '0;
      prefer_loc     <= 1'b0;
    end else begin
      if (grant_fwd) begin
        ring_out_valid <= 1'b1;
        ring_out_pkt   <= ring_in_pkt;
        prefer_loc     <= 1'b1;
      end else if (grant_loc) begin
        ring_out_valid <= 1'b1;
        ring_out_pkt   <= local_in_pkt;
        prefer_loc     <= 1'b0;
      end else if (ring_out_ready) begin
        ring_out_valid <= 1'b0;
      end
    end
  end

  a_one_grant: assert property (@(posedge clk) disable iff (!rst_n) !(grant_fwd && grant_loc));
  a_out_hold:  assert property (@(posedge clk) disable iff (!rst_n)
                                ring_out_valid && !ring_out_ready |=> ring_out_valid && $stable(ring_out_pkt));

endmodule
