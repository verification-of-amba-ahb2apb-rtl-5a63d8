// ahb2apb_bridge -- AMBA AHB to APB bridge with separate, unrelated clocks.
//
// The bridge is an AHB slave and the only APB master. It turns each AHB
// transfer addressed to it into one two-cycle APB transfer on PCLK. The AHB
// and APB clocks need no fixed relation: the two sides exchange a latched
// request and a four-phase handshake (PENDWR or PENDRD from the AHB side,
// PDONE from the APB side), each level passing a two-flop synchroniser.
//
//   ahb_response     (HCLK) accepts and checks AHB transfers, holds HREADYOUT
//                    low while the APB side works, answers invalid transfers
//                    with an ERROR response, drives PENDWR/PENDRD, returns
//                    HRDATA
//   control_transfer (HCLK) latches address, control and (one cycle later)
//                    write data, so one complete request is presented at a
//                    time
//   apb_access       (PCLK) decodes PSEL, drives SETUP then ACCESS, samples
//                    PRDATA, raises PDONE
//
// Interface: AHB slave signals HSEL, HTRANS, HADDR, HWRITE, HSIZE, HWDATA,
// HREADY (in), HREADYOUT, HRESP (single bit, OKAY/ERROR), HRDATA; APB master
// signals PSEL[NUM_SLAVES-1:0], PENABLE, PADDR, PWRITE, PWDATA, PRDATA.
// Resets HRESETn and PRESETn are active low.
// Data lanes: PWDATA and HRDATA carry the bytes of a byte or halfword
// transfer right-justified (see control_transfer).
// The three-block split and the handshake names follow the bridge's
// architecture; widths of 32 bits match its transfers; the number of
// peripherals and the address map are this design's choices.
module ahb2apb_bridge
  import ahb2apb_pkg::*;
#(
  parameter int unsigned NUM_SLAVES  = 3,
  parameter int unsigned SYNC_STAGES = 2
) (
  // AHB side
  input  logic                  hclk,
  input  logic                  hresetn,
  input  logic                  hsel,
  input  logic [1:0]            htrans,
  input  logic [ADDR_W-1:0]     haddr,
  input  logic                  hwrite,
  input  logic [2:0]            hsize,
  input  logic [DATA_W-1:0]     hwdata,
  input  logic                  hready_in,
  output logic                  hreadyout,
  output logic                  hresp,
  output logic [DATA_W-1:0]     hrdata,
  // APB side
  input  logic                  pclk,
  input  logic                  presetn,
  output logic [NUM_SLAVES-1:0] psel,
  output logic                  penable,
  output logic [ADDR_W-1:0]     paddr,
  output logic                  pwrite,
  output logic [DATA_W-1:0]     pwdata,
  input  logic [DATA_W-1:0]     prdata
);

  logic              load, release_req, req_ready, busy;
  logic [DATA_W-1:0] rdata_fmt, apb_rdata;
  logic              pendwr, pendrd, pdone;
  apb_req_t          req;

  ahb_response #(.NUM_SLAVES(NUM_SLAVES), .SYNC_STAGES(SYNC_STAGES)) u_ahb_response (
    .hclk        (hclk),
    .hresetn     (hresetn),
    .hsel        (hsel),
    .htrans      (htrans),
    .haddr       (haddr),
    .hwrite      (hwrite),
    .hsize       (hsize),
    .hready_in   (hready_in),
    .hreadyout   (hreadyout),
    .hresp       (hresp),
    .hrdata      (hrdata),
    .load        (load),
    .release_req (release_req),
    .req_ready   (req_ready),
    .rdata_fmt   (rdata_fmt),
    .pendwr      (pendwr),
    .pendrd      (pendrd),
    .pdone       (pdone)
  );

  control_transfer u_control_transfer (
    .hclk        (hclk),
    .hresetn     (hresetn),
    .load        (load),
    .haddr       (haddr),
    .hwrite      (hwrite),
    .hsize       (hsize),
    .hwdata      (hwdata),
    .release_req (release_req),
    .req         (req),
    .req_ready   (req_ready),
    .busy        (busy),
    .apb_rdata   (apb_rdata),
    .rdata_fmt   (rdata_fmt)
  );

  apb_access #(.NUM_SLAVES(NUM_SLAVES), .SYNC_STAGES(SYNC_STAGES)) u_apb_access (
    .pclk    (pclk),
    .presetn (presetn),
    .pendwr  (pendwr),
    .pendrd  (pendrd),
    .req     (req),
    .pdone   (pdone),
    .rdata   (apb_rdata),
    .psel    (psel),
    .penable (penable),
    .paddr   (paddr),
    .pwrite  (pwrite),
    .pwdata  (pwdata),
    .prdata  (prdata)
  );

  // busy is used by control_transfer's own one-request check; nothing else
  // in the bridge needs it.
  logic unused_busy;
  assign unused_busy = busy;

endmodule
