// axi2apb_pkg: types and constants shared by the AXI4-Lite to APB bridge.
//
// The bridge carries 32-bit addresses and 32-bit data on both sides, as its
// AXI4-Lite slave and APB master interfaces are 32 bits wide. A transfer that
// crosses from the ACLK domain to the PCLK domain is carried as one
// apb_req_t word, held stable by the sender until the receiver acknowledges;
// the answer returns as one apb_rsp_t word under the same rule. The response
// codes are the AXI BRESP/RRESP encodings.
package axi2apb_pkg;

  localparam int unsigned ADDR_W = 32;
  localparam int unsigned DATA_W = 32;
  localparam int unsigned STRB_W = DATA_W / 8;
  // Largest number of APB peripherals the address map can select.
  localparam int unsigned MAX_SLV = 16;
  localparam int unsigned IDX_W   = $clog2(MAX_SLV);

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] data_t;
  typedef logic [STRB_W-1:0] strb_t;
  typedef logic [IDX_W-1:0]  idx_t;

  // AXI response codes (BRESP / RRESP).
  typedef enum logic [1:0] {
    RESP_OKAY   = 2'b00,
    RESP_EXOKAY = 2'b01,
    RESP_SLVERR = 2'b10,
    RESP_DECERR = 2'b11
  } resp_e;

  // One APB transfer, as handed from the AXI side to the APB side.
  typedef struct packed {
    addr_t      addr;   // byte address, driven on PADDR
    data_t      wdata;  // PWDATA
    strb_t      strb;   // PSTRB (all zero for reads)
    logic [2:0] prot;   // PPROT, from AWPROT or ARPROT
    logic       write;  // PWRITE
    idx_t       sel;    // peripheral slot, selects one PSEL line
  } apb_req_t;

  // The result of one APB transfer.
  typedef struct packed {
    data_t rdata;   // PRDATA sampled in the last ENABLE cycle
    logic  slverr;  // PSLVERR sampled in the last ENABLE cycle
  } apb_rsp_t;

endpackage
