// ring_ctrl: turns the packets addressed to this chip into DLA commands.
//
// Takes packets from the ring node's local output and acts on them:
//   WR_INSTR    writes one instruction into the instruction buffer.
//   WR_INPUT    writes four packed int8 bytes (with a byte mask) at a 4-aligned byte
//               address of input memory A's write bank.
//   KICK        starts the program at the given pc (taken when the DLA is idle) and
//               remembers the sender, who gets a DONE packet when the program halts.
//   CLR_RESULT  zeroes the accumulation (result) memories (taken when idle).
//   RD_RESULT   reads one accumulation entry, addr = {lane, address}, and sends it
//               back to the sender in a RESULT packet (taken when idle).
// Other commands are dropped. Packets it sends go to the ring node's local input;
// a DONE goes ahead of a waiting RESULT. Commands the DLA cannot take yet stay on
// the ring (ready low), which stalls the ring behind them. The command set and
// encodings are this design's choices (ring_pkg). Most command outputs are packet
// fields passed straight through, and the fixed fields of reply packets (command
// codes, unused data bits) are constants. Reset: asynchronous, active low.
module ring_ctrl
  import ring_pkg::*;
  import dla_pkg::*;
#(
  parameter int LANES     = 8,
  parameter int VEC       = 8,
  parameter int IB_DEPTH  = 256,
  parameter int INA_DEPTH = 64,
  parameter int ACC_DEPTH = 256,
  localparam int PCW = $clog2(IB_DEPTH),
  localparam int IAW = $clog2(INA_DEPTH),
  localparam int CAW = $clog2(ACC_DEPTH),
  localparam int LW  = (LANES > 1) ? $clog2(LANES) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [ID_W-1:0]     my_id,
  input  logic                in_valid,
  output logic                in_ready,
  input  ring_pkt_t           in_pkt,
  output logic                out_valid,
  input  logic                out_ready,
  output ring_pkt_t           out_pkt,
  // DLA side
  output logic                ib_wr_en,
  output logic [PCW-1:0]      ib_wr_addr,
  output logic [INSTR_W-1:0]  ib_wr_data,
  output logic                ina_wr_en,
  output logic [IAW-1:0]      ina_wr_addr,
  output logic [VEC-1:0]      ina_wr_be,
  output logic [VEC-1:0][7:0] ina_wr_data,
  output logic                kick,
  output logic [PCW-1:0]      kick_pc,
  output logic                clr,
  input  logic                idle,
  input  logic                done,
  output logic                rr_req,
  output logic [LW-1:0]       rr_lane,
  output logic [CAW-1:0]      rr_addr,
  input  logic                rr_gnt,
  input  logic                rr_valid,
  input  logic [ACC_W-1:0]    rr_data
);

  localparam int CPW = VEC / 4;                  // 4-byte chunks per input word
  localparam int CW  = (CPW > 1) ? $clog2(CPW) : 1;

  logic [ID_W-1:0]  kicker, reader;
  logic             done_pend, rd_wait, resp_pend;
  logic [ACC_W-1:0] resp_data;
  logic [13:0]      chunk;
  logic [CW-1:0]    sub;

  initial begin
    assert (VEC % 4 == 0) else $error("ring_ctrl: VEC must be a multiple of 4");
  end

  assign chunk = in_pkt.addr[15:2];
  assign sub   = (CPW > 1) ? CW'(chunk % CPW) : '0;

  assign ib_wr_addr  = PCW'(in_pkt.addr);
  assign ib_wr_data  = in_pkt.data[INSTR_W-1:0];
  assign ina_wr_addr = IAW'(chunk / CPW);
  assign kick_pc     = PCW'(in_pkt.addr);
  assign rr_lane     = LW'(in_pkt.addr >> CAW);
  assign rr_addr     = CAW'(in_pkt.addr);

  always_comb begin
    ina_wr_be   = '0;
    ina_wr_data = '0;
    for (int c = 0; c < CPW; c++) begin
      for (int b = 0; b < 4; b++) begin
        ina_wr_data[4*c + b] = in_pkt.data[8*b +: 8];
        ina_wr_be[4*c + b]   = (int'(sub) == c) && in_pkt.data[32 + b];
      end
    end
  end

  always_comb begin
    ib_wr_en  = 1'b0;
    ina_wr_en = 1'b0;
    kick      = 1'b0;
    clr       = 1'b0;
    rr_req    = 1'b0;
    in_ready  = 1'b1;
    if (in_valid) begin
      unique case (in_pkt.cmd)
        CMD_WR_INSTR: ib_wr_en  = 1'b1;
        CMD_WR_INPUT: ina_wr_en = 1'b1;
        CMD_KICK: begin
          kick     = idle;
          in_ready = idle;
        end
        CMD_CLR_RESULT: begin
          clr      = idle;
          in_ready = idle;
        end
        CMD_RD_RESULT: begin
          rr_req   = !rd_wait && !resp_pend;
          in_ready = rr_gnt;
        end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      kicker    <= '0;
      reader    <= '0;
      done_pend <= 1'b0;
      rd_wait   <= 1'b0;
      resp_pend <= 1'b0;
      resp_data <= '0;
    end else begin
      if (kick) kicker <= in_pkt.src;
      if (rr_gnt) begin
        reader  <= in_pkt.src;
        rd_wait <= 1'b1;
      end
      if (rr_valid) begin
        rd_wait   <= 1'b0;
        resp_pend <= 1'b1;
        resp_data <= rr_data;
      end
      if (done) done_pend <= 1'b1;
      if (out_valid && out_ready) begin
        if (done_pend) done_pend <= 1'b0;
        else           resp_pend <= 1'b0;
      end
    end
  end

  always_comb begin
    out_valid = done_pend || resp_pend;
    out_pkt   = '0;
    out_pkt.src = my_id;
    if (done_pend) begin
      out_pkt.dest = kicker;
      out_pkt.cmd  = CMD_DONE;
    end else begin
      out_pkt.dest = reader;
      out_pkt.cmd  = CMD_RESULT;
      out_pkt.data = DATA_W'(resp_data);
    end
  end

endmodule
