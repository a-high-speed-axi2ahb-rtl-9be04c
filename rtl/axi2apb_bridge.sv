// axi2apb_bridge: AXI4-Lite slave to APB master bridge with independent clocks.
//
// An AXI4-Lite master on ACLK reaches up to 16 APB peripherals on PCLK, where
// the two clocks may have any frequency and phase relation. The bridge takes
// one AXI4-Lite transfer at a time, checks its address against the internal
// address map, runs it as an APB transfer (SETUP, then ENABLE with PREADY wait
// states) and returns the result on the AXI write response or read data
// channel. Reads are served before writes when both are pending. An address
// with no peripheral gets DECERR and never reaches APB; a peripheral that
// raises PSLVERR gives SLVERR.
//
// Structure: axi_slave_fsm (ACLK domain) and apb_master_fsm (PCLK domain)
// exchange one request word and one response word. Each word is held stable by
// its sender while a single toggle bit announces it; the toggle crosses
// through a two-flop synchroniser (sync2), so no multi-bit value is ever
// synchronised. The round trip adds SYNC_STAGES+1 cycles of the receiving
// clock in each direction on top of the APB transfer.
//
// Interface: AXI4-Lite slave (s_axi_*, 32-bit address and data) on aclk /
// aresetn; APB4 master (m_apb_*: PADDR, one-hot PSEL, PENABLE, PWRITE,
// PWDATA, PSTRB, PPROT, and per-slot PRDATA, PREADY, PSLVERR) on pclk /
// presetn. Both resets are asynchronous, active low, and should be asserted
// together.
module axi2apb_bridge
  import axi2apb_pkg::*;
#(
  parameter int unsigned NUM_SLV       = 16,
  parameter int unsigned SLV_ADDR_BITS = 12,
  parameter addr_t       BASE_ADDR     = 32'h4000_0000,
  parameter logic [MAX_SLV-1:0] SLV_PRESENT = '1,
  parameter int unsigned SYNC_STAGES   = 2
) (
  // AXI4-Lite slave, ACLK domain
  input  logic               aclk,
  input  logic               aresetn,
  input  addr_t              s_axi_awaddr,
  input  logic [2:0]         s_axi_awprot,
  input  logic               s_axi_awvalid,
  output logic               s_axi_awready,
  input  data_t              s_axi_wdata,
  input  strb_t              s_axi_wstrb,
  input  logic               s_axi_wvalid,
  output logic               s_axi_wready,
  output logic [1:0]         s_axi_bresp,
  output logic               s_axi_bvalid,
  input  logic               s_axi_bready,
  input  addr_t              s_axi_araddr,
  input  logic [2:0]         s_axi_arprot,
  input  logic               s_axi_arvalid,
  output logic               s_axi_arready,
  output data_t              s_axi_rdata,
  output logic [1:0]         s_axi_rresp,
  output logic               s_axi_rvalid,
  input  logic               s_axi_rready,
  // APB master, PCLK domain
  input  logic               pclk,
  input  logic               presetn,
  output addr_t              m_apb_paddr,
  output logic [NUM_SLV-1:0] m_apb_psel,
  output logic               m_apb_penable,
  output logic               m_apb_pwrite,
  output data_t              m_apb_pwdata,
  output strb_t              m_apb_pstrb,
  output logic [2:0]         m_apb_pprot,
  input  data_t              m_apb_prdata  [NUM_SLV],
  input  logic [NUM_SLV-1:0] m_apb_pready,
  input  logic [NUM_SLV-1:0] m_apb_pslverr
);

  apb_req_t req;
  apb_rsp_t rsp;
  logic     req_tgl, ack_tgl;

  axi_slave_fsm #(
    .NUM_SLV      (NUM_SLV),
    .SLV_ADDR_BITS(SLV_ADDR_BITS),
    .BASE_ADDR    (BASE_ADDR),
    .SLV_PRESENT  (SLV_PRESENT),
    .SYNC_STAGES  (SYNC_STAGES)
  ) u_axi (
    .aclk         (aclk),
    .aresetn      (aresetn),
    .s_axi_awaddr (s_axi_awaddr),
    .s_axi_awprot (s_axi_awprot),
    .s_axi_awvalid(s_axi_awvalid),
    .s_axi_awready(s_axi_awready),
    .s_axi_wdata  (s_axi_wdata),
    .s_axi_wstrb  (s_axi_wstrb),
    .s_axi_wvalid (s_axi_wvalid),
    .s_axi_wready (s_axi_wready),
    .s_axi_bresp  (s_axi_bresp),
    .s_axi_bvalid (s_axi_bvalid),
    .s_axi_bready (s_axi_bready),
    .s_axi_araddr (s_axi_araddr),
    .s_axi_arprot (s_axi_arprot),
    .s_axi_arvalid(s_axi_arvalid),
    .s_axi_arready(s_axi_arready),
    .s_axi_rdata  (s_axi_rdata),
    .s_axi_rresp  (s_axi_rresp),
    .s_axi_rvalid (s_axi_rvalid),
    .s_axi_rready (s_axi_rready),
    .req_o        (req),
    .req_tgl_o    (req_tgl),
    .ack_tgl_i    (ack_tgl),
    .rsp_i        (rsp)
  );

  apb_master_fsm #(
    .NUM_SLV    (NUM_SLV),
    .SYNC_STAGES(SYNC_STAGES)
  ) u_apb (
    .pclk         (pclk),
    .presetn      (presetn),
    .req_tgl_i    (req_tgl),
    .req_i        (req),
    .ack_tgl_o    (ack_tgl),
    .rsp_o        (rsp),
    .m_apb_paddr  (m_apb_paddr),
    .m_apb_psel   (m_apb_psel),
    .m_apb_penable(m_apb_penable),
    .m_apb_pwrite (m_apb_pwrite),
    .m_apb_pwdata (m_apb_pwdata),
    .m_apb_pstrb  (m_apb_pstrb),
    .m_apb_pprot  (m_apb_pprot),
    .m_apb_prdata (m_apb_prdata),
    .m_apb_pready (m_apb_pready),
    .m_apb_pslverr(m_apb_pslverr)
  );

endmodule
