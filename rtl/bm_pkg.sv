// Shared types and constants of the AHB BusMatrix.
//
// The BusMatrix connects AHB-Lite masters and slaves. Each master port carries
// one address-phase bundle (bm_req_t) plus write data; each slave port returns
// one response bundle (bm_rsp_t). Transfer types and responses follow the AMBA
// AHB encodings. Bus widths are 32 bits, the usual AHB width; the document
// does not state a width, so it is this design's choice.
package bm_pkg;

  localparam int unsigned ADDR_W = 32;
  localparam int unsigned DATA_W = 32;

  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_e;

  typedef enum logic [1:0] {
    HRESP_OKAY  = 2'b00,
    HRESP_ERROR = 2'b01,
    HRESP_RETRY = 2'b10,
    HRESP_SPLIT = 2'b11
  } hresp_e;

  // Address-phase signals of one master (address and control).
  typedef struct packed {
    logic [ADDR_W-1:0] haddr;
    htrans_e           htrans;
    logic              hwrite;
    logic [2:0]        hsize;
    logic [2:0]        hburst;
    logic [3:0]        hprot;
  } bm_req_t;

  // Data-phase response of one slave.
  typedef struct packed {
    logic              hreadyout;
    hresp_e            hresp;
    logic [DATA_W-1:0] hrdata;
  } bm_rsp_t;

  localparam bm_req_t REQ_IDLE = '{haddr: '0, htrans: HTRANS_IDLE, hwrite: 1'b0,
                                   hsize: 3'b010, hburst: 3'b000, hprot: 4'b0011};

endpackage
