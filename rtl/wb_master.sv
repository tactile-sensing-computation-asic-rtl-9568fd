// wb_master: Wishbone master that reads weight words from the QSPI flash.
//
// The flash holding the model weights sits behind a Wishbone slave (a QSPI flash
// controller); this master turns one read request into one Wishbone classic read
// cycle: cyc/stb high with the address until the slave's ack, then the data is
// returned on rsp_valid/rsp_data for one cycle. One request is in flight at a time;
// req_ready is high while the master is idle. Word width is 32 bits with all byte
// selects set; addresses are byte addresses. The master only reads, so we_o and
// dat_o stay low and sel_o stays all ones. That weights are read through an
// on-chip Wishbone master follows the chip's description; the classic (non-pipelined)
// cycle and the request/response interface are this design's choices.
module wb_master #(
  parameter int AW = 32,
  parameter int DW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  // request / response
  input  logic          req_valid,
  output logic          req_ready,
  input  logic [AW-1:0] req_addr,
  output logic          rsp_valid,
  output logic [DW-1:0] rsp_data,
  // Wishbone
  output logic          wb_cyc_o,
  output logic          wb_stb_o,
  output logic          wb_we_o,
  output logic [AW-1:0] wb_adr_o,
  output logic [DW/8-1:0] wb_sel_o,
  output logic [DW-1:0] wb_dat_o,
  input  logic [DW-1:0] wb_dat_i,
  input  logic          wb_ack_i
);

  logic busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      wb_adr_o  <= '0;
      rsp_valid <= 1'b0;
      rsp_data  <= '0;
    end else begin
      rsp_valid <= 1'b0;
      if (!busy) begin
        if (req_valid) begin
          busy     <= 1'b1;
          wb_adr_o <= req_addr;
        end
      end else if (wb_ack_i) begin
        busy      <= 1'b0;
        rsp_valid <= 1'b1;
        rsp_data  <= wb_dat_i;
      end
    end
  end

  assign req_ready = !busy;
  assign wb_cyc_o  = busy;
  assign wb_stb_o  = busy;
  assign wb_we_o   = 1'b0;
  assign wb_sel_o  = '1;
  assign wb_dat_o  = '0;

  // Wishbone classic: a strobe needs a cycle, and the address holds until ack.
  a_stb_in_cyc: assert property (@(posedge clk) disable iff (!rst_n) wb_stb_o |-> wb_cyc_o);
  a_adr_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                 wb_stb_o && !wb_ack_i |=> $stable(wb_adr_o));
  a_no_ack_idle: assert property (@(posedge clk) disable iff (!rst_n) wb_ack_i |-> wb_cyc_o);

endmodule
