// dla_chip: top level of the tactile-sensing compute chip.
//
// The chip is a deep learning accelerator that sits on a packet ring with a control
// chip (and, in larger systems, further compute chips). Packets from the previous
// chip enter ring_in; the ring node keeps those addressed to this chip's id and
// forwards the rest on ring_out. The kept packets load the program, stream sensor
// bytes into input memory A, kick off the program, clear and read back the result
// buffer (ring_ctrl). The DLA core runs the program, fetching weights from an
// external QSPI flash through the Wishbone bus, and results and a DONE notice go
// back out on ring_out. The BSG DDR link channels that carry the ring between chips
// and the QSPI flash controller are not part of this RTL: the ring appears here as
// valid/ready packet channels and the flash as a Wishbone master port. The chip id
// is an input (for example strap pins). The partition (top level, ring node, ring
// wrapper, DLA) follows the chip's description; the packet format is this design's.
module dla_chip
  import ring_pkg::*;
  import dla_pkg::*;
#(
  parameter int LANES     = 8,
  parameter int VEC       = 8,
  parameter int STAGES    = 2,
  parameter int IB_DEPTH  = 256,
  parameter int INA_DEPTH = 64,
  parameter int INB_DEPTH = 64,
  parameter int W_DEPTH   = 256,
  parameter int ACC_DEPTH = 256
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [ID_W-1:0] my_id,
  input  logic            ring_in_valid,
  output logic            ring_in_ready,
  input  ring_pkt_t       ring_in_pkt,
  output logic            ring_out_valid,
  input  logic            ring_out_ready,
  output ring_pkt_t       ring_out_pkt,
  output logic            busy,
  output logic            wb_cyc_o,
  output logic            wb_stb_o,
  output logic            wb_we_o,
  output logic [31:0]     wb_adr_o,
  output logic [3:0]      wb_sel_o,
  output logic [31:0]     wb_dat_o,
  input  logic [31:0]     wb_dat_i,
  input  logic            wb_ack_i
);

  localparam int PCW = $clog2(IB_DEPTH);
  localparam int IAW = $clog2(INA_DEPTH);
  localparam int CAW = $clog2(ACC_DEPTH);
  localparam int LW  = (LANES > 1) ? $clog2(LANES) : 1;

  logic                lo_valid, lo_ready, li_valid, li_ready;
  ring_pkt_t           lo_pkt, li_pkt;

  logic                ib_wr_en, ina_wr_en, kick, clr, idle, done;
  logic [PCW-1:0]      ib_wr_addr, kick_pc;
  logic [INSTR_W-1:0]  ib_wr_data;
  logic [IAW-1:0]      ina_wr_addr;
  logic [VEC-1:0]      ina_wr_be;
  logic [VEC-1:0][7:0] ina_wr_data;
  logic                rr_req, rr_gnt, rr_valid;
  logic [LW-1:0]       rr_lane;
  logic [CAW-1:0]      rr_addr;
  logic [ACC_W-1:0]    rr_data;

  ring_node u_node (
    .clk, .rst_n, .my_id,
    .ring_in_valid, .ring_in_ready, .ring_in_pkt,
    .ring_out_valid, .ring_out_ready, .ring_out_pkt,
    .local_out_valid(lo_valid), .local_out_ready(lo_ready), .local_out_pkt(lo_pkt),
    .local_in_valid (li_valid), .local_in_ready (li_ready), .local_in_pkt (li_pkt)
  );

  ring_ctrl #(
    .LANES(LANES), .VEC(VEC), .IB_DEPTH(IB_DEPTH), .INA_DEPTH(INA_DEPTH), .ACC_DEPTH(ACC_DEPTH)
  ) u_rctl (
    .clk, .rst_n, .my_id,
    .in_valid(lo_valid), .in_ready(lo_ready), .in_pkt(lo_pkt),
    .out_valid(li_valid), .out_ready(li_ready), .out_pkt(li_pkt),
    .ib_wr_en, .ib_wr_addr, .ib_wr_data,
    .ina_wr_en, .ina_wr_addr, .ina_wr_be, .ina_wr_data,
    .kick, .kick_pc, .clr, .idle, .done,
    .rr_req, .rr_lane, .rr_addr, .rr_gnt, .rr_valid, .rr_data
  );

  dla #(
    .LANES(LANES), .VEC(VEC), .STAGES(STAGES), .IB_DEPTH(IB_DEPTH), .INA_DEPTH(INA_DEPTH),
    .INB_DEPTH(INB_DEPTH), .W_DEPTH(W_DEPTH), .ACC_DEPTH(ACC_DEPTH)
  ) u_dla (
    .clk, .rst_n,
    .ib_wr_en, .ib_wr_addr, .ib_wr_data,
    .ina_wr_en, .ina_wr_addr, .ina_wr_be, .ina_wr_data,
    .kick, .kick_pc, .clr, .idle, .done,
    .rr_req, .rr_lane, .rr_addr, .rr_gnt, .rr_valid, .rr_data,
    .wb_cyc_o, .wb_stb_o, .wb_we_o, .wb_adr_o, .wb_sel_o, .wb_dat_o, .wb_dat_i, .wb_ack_i
  );

  assign busy = !idle;

endmodule
