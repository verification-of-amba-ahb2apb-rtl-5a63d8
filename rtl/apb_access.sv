// apb_access -- APB master of the bridge (APB clock domain).
//
// The bridge is the only master on the APB. This block waits for the
// synchronised PENDWR or PENDRD request from the AHB side, then runs one APB
// transfer from the latched request (req):
//   SETUP  : PADDR, PWRITE, PWDATA driven, one PSEL line high, PENABLE low
//   ACCESS : PENABLE high; at the end of this cycle a read samples PRDATA
//   DONE   : PSEL and PENABLE low, PDONE high until the request line drops
// PENDWR selects a write and PENDRD a read. The address is decoded into a
// one-hot PSEL with ahb2apb_pkg::decode_slave, so at most one select is high;
// an address outside the map (which ahb_response never forwards) selects
// nothing and gets no PENABLE strobe, but still completes the handshake.
// PADDR, PWRITE and PWDATA stay latched after the transfer until the next one.
// The captured read data (rdata) is held from DONE until the next ACCESS, so
// the AHB side can take it after it has seen PDONE.
//
// The list of duties (latch the address, decode PSEL, drive write data,
// return read data, generate the PENABLE strobe) and the PDONE handshake are
// the bridge's; the state encoding, the synchroniser depth and the absence of
// PREADY/PSLVERR (APB without wait states) are this design's choices.
//
// The request's size field is not needed here (the lanes were formatted on
// the AHB side), so lint reports those bits of req unused.
//
// Timing: from PENDWR/PENDRD rising to SETUP is SYNC_STAGES + 1 PCLK edges;
// each APB transfer is exactly two PCLK cycles. Reset is active low,
// asynchronous.
module apb_access
  import ahb2apb_pkg::*;
#(
  parameter int unsigned NUM_SLAVES  = 3,
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic                  pclk,
  input  logic                  presetn,
  // handshake and request from the AHB side (HCLK domain, held stable)
  input  logic                  pendwr,
  input  logic                  pendrd,
  input  apb_req_t              req,
  output logic                  pdone,
  output logic [DATA_W-1:0]     rdata,
  // APB master port
  output logic [NUM_SLAVES-1:0] psel,
  output logic                  penable,
  output logic [ADDR_W-1:0]     paddr,
  output logic                  pwrite,
  output logic [DATA_W-1:0]     pwdata,
  input  logic [DATA_W-1:0]     prdata
);

  typedef enum logic [1:0] {PA_IDLE, PA_SETUP, PA_ACCESS, PA_DONE} pa_state_e;
  pa_state_e state;

  logic pendwr_s, pendrd_s;
  logic [NUM_SLAVES-1:0] sel_onehot;

  sync_2ff #(.STAGES(SYNC_STAGES)) u_sync_wr (
    .clk(pclk), .rst_n(presetn), .d(pendwr), .q(pendwr_s));
  sync_2ff #(.STAGES(SYNC_STAGES)) u_sync_rd (
    .clk(pclk), .rst_n(presetn), .d(pendrd), .q(pendrd_s));

  always_comb begin
    int idx;
    idx        = decode_slave(req.addr, NUM_SLAVES);
    sel_onehot = '0;
    for (int i = 0; i < NUM_SLAVES; i++)
      if (idx == i) sel_onehot[i] = 1'b1;
  end

  always_ff @(posedge pclk or negedge presetn) begin
    if (!presetn) begin
      state   <= PA_IDLE;
      psel    <= '0;
      penable <= 1'b0;
      paddr   <= '0;
      pwrite  <= 1'b0;
      pwdata  <= '0;
      pdone   <= 1'b0;
      rdata   <= '0;
    end else begin
      unique case (state)
        PA_IDLE: if (pendwr_s || pendrd_s) begin
          paddr  <= req.addr;
          pwrite <= pendwr_s;
          if (pendwr_s) pwdata <= req.wdata;
          psel   <= sel_onehot;
          state  <= PA_SETUP;
        end
        PA_SETUP: begin
          penable <= |psel;   // no strobe if the address selected nothing
          state   <= PA_ACCESS;
        end
        PA_ACCESS: begin
          if (!pwrite) rdata <= prdata;
          psel    <= '0;
          penable <= 1'b0;
          pdone   <= 1'b1;
          state   <= PA_DONE;
        end
        PA_DONE: if (!pendwr_s && !pendrd_s) begin
          pdone <= 1'b0;
          state <= PA_IDLE;
        end
        default: state <= PA_IDLE;
      endcase
    end
  end

  // APB protocol rules
  a_psel_onehot: assert property (@(posedge pclk) disable iff (!presetn)
                                  $onehot0(psel))
    else $error("apb_access: more than one PSEL high");
  a_setup_then_access: assert property (@(posedge pclk) disable iff (!presetn)
                                        (|psel && !penable) |=> (|psel && penable))
    else $error("apb_access: SETUP not followed by ACCESS");
  a_access_one_cycle: assert property (@(posedge pclk) disable iff (!presetn)
                                       penable |=> !penable)
    else $error("apb_access: ACCESS longer than one cycle");
  a_stable_in_access: assert property (@(posedge pclk) disable iff (!presetn)
                                       penable |-> $stable(paddr) && $stable(pwrite) && $stable(pwdata))
    else $error("apb_access: address or data changed during ACCESS");

endmodule
