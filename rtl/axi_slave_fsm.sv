// axi_slave_fsm: the ACLK-domain half of the AXI4-Lite to APB bridge.
//
// It is the AXI4-Lite slave. The write address and write data channels are
// independent, so each has a one-entry buffer: AWREADY / WREADY are high while
// the buffer is empty, and a write is ready to go once both are full. The read
// address channel is taken straight from the bus: ARREADY is high in IDLE.
// When a read and a write are both ready in IDLE, the read goes first and the
// write follows it on APB.
//
// The chosen address goes through the internal address map (addr_decoder).
// An unmapped address is not forwarded: the FSM answers at once with DECERR.
// A mapped one is loaded into req_o and handed to the PCLK domain by flipping
// req_tgl_o; req_o then stays unchanged until the PCLK side flips ack_tgl_i,
// which arrives here through a two-flop synchroniser. The APB result in rsp_i
// is stable by then and is turned into OKAY, or SLVERR when the peripheral
// raised PSLVERR. The FSM then holds BVALID or RVALID, with the response,
// until the master takes it (the RESP state), and returns to IDLE.
//
// States: IDLE -> APB (transfer running in PCLK domain) -> RESP -> IDLE,
// or IDLE -> RESP directly for DECERR. One transfer is in flight at a time.
// Timing: a mapped transfer takes 1 ACLK cycle to issue, the APB transfer plus
// two synchroniser stages in each direction, and 1 ACLK cycle to present the
// response. Read priority, DECERR/SLVERR and the response hold state follow
// the design's specification; the one-entry AW/W buffers and the toggle
// handshake are this design's choices. Reset (aresetn) is asynchronous, active
// low. The assertions at the end use aresetn in 'disable iff', which lint
// reports as a reset used both asynchronously and synchronously; it is
// only the assertions' sampling and is intended.
module axi_slave_fsm
  import axi2apb_pkg::*;
#(
  parameter int unsigned NUM_SLV       = 16,
  parameter int unsigned SLV_ADDR_BITS = 12,
  parameter addr_t       BASE_ADDR     = 32'h4000_0000,
  parameter logic [MAX_SLV-1:0] SLV_PRESENT = '1,
  parameter int unsigned SYNC_STAGES   = 2
) (
  input  logic       aclk,
  input  logic       aresetn,
  // AXI4-Lite write address channel
  input  addr_t      s_axi_awaddr,
  input  logic [2:0] s_axi_awprot,
  input  logic       s_axi_awvalid,
  output logic       s_axi_awready,
  // write data channel
  input  data_t      s_axi_wdata,
  input  strb_t      s_axi_wstrb,
  input  logic       s_axi_wvalid,
  output logic       s_axi_wready,
  // write response channel
  output logic [1:0] s_axi_bresp,
  output logic       s_axi_bvalid,
  input  logic       s_axi_bready,
  // read address channel
  input  addr_t      s_axi_araddr,
  input  logic [2:0] s_axi_arprot,
  input  logic       s_axi_arvalid,
  output logic       s_axi_arready,
  // read data channel
  output data_t      s_axi_rdata,
  output logic [1:0] s_axi_rresp,
  output logic       s_axi_rvalid,
  input  logic       s_axi_rready,
  // to / from the PCLK domain
  output apb_req_t   req_o,
  output logic       req_tgl_o,
  input  logic       ack_tgl_i,   // from the PCLK domain, unsynchronised
  input  apb_rsp_t   rsp_i        // stable when ack_tgl_i has flipped
);

  typedef enum logic [1:0] {ST_IDLE, ST_APB, ST_RESP} state_e;

  state_e     state;

  // one-entry buffers for the write address and write data channels
  logic       aw_full, w_full;
  addr_t      aw_addr;
  logic [2:0] aw_prot;
  data_t      w_data;
  strb_t      w_strb;

  // response registers
  logic       resp_read;   // the held response is a read response
  resp_e      resp;
  data_t      rdata;

  // acknowledgement from the PCLK domain
  logic       ack_sync, ack_seen, ack_pulse;

  // arbitration and decode of the next request
  logic       take_rd, take_wr;
  addr_t      dec_addr;
  logic       dec_hit;
  idx_t       dec_sel;

  sync2 #(.WIDTH(1), .STAGES(SYNC_STAGES)) u_ack_sync (
    .clk  (aclk),
    .rst_n(aresetn),
    .d    (ack_tgl_i),
    .q    (ack_sync)
  );

  assign ack_pulse = (ack_sync != ack_seen);

  // read first: a pending read always wins over a complete write
  always_comb begin
    take_rd  = (state == ST_IDLE) && s_axi_arvalid;
    take_wr  = (state == ST_IDLE) && !s_axi_arvalid && aw_full && w_full;
    dec_addr = take_rd ? s_axi_araddr : aw_addr;
  end

  addr_decoder #(
    .NUM_SLV      (NUM_SLV),
    .SLV_ADDR_BITS(SLV_ADDR_BITS),
    .BASE_ADDR    (BASE_ADDR),
    .SLV_PRESENT  (SLV_PRESENT)
  ) u_dec (
    .addr(dec_addr),
    .hit (dec_hit),
    .sel (dec_sel)
  );

  assign s_axi_awready = !aw_full;
  assign s_axi_wready  = !w_full;
  assign s_axi_arready = (state == ST_IDLE);

  assign s_axi_bvalid  = (state == ST_RESP) && !resp_read;
  assign s_axi_bresp   = resp;
  assign s_axi_rvalid  = (state == ST_RESP) && resp_read;
  assign s_axi_rresp   = resp;
  assign s_axi_rdata   = rdata;

  // write channel buffers
  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      aw_full <= 1'b0;
      aw_addr <= '0;
      aw_prot <= '0;
      w_full  <= 1'b0;
      w_data  <= '0;
      w_strb  <= '0;
    end else begin
      if (s_axi_awvalid && s_axi_awready) begin
        aw_full <= 1'b1;
        aw_addr <= s_axi_awaddr;
        aw_prot <= s_axi_awprot;
      end else if (take_wr) begin
        aw_full <= 1'b0;
      end
      if (s_axi_wvalid && s_axi_wready) begin
        w_full <= 1'b1;
        w_data <= s_axi_wdata;
        w_strb <= s_axi_wstrb;
      end else if (take_wr) begin
        w_full <= 1'b0;
      end
    end
  end

  // transfer FSM
  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      state     <= ST_IDLE;
      req_o     <= '0;
      req_tgl_o <= 1'b0;
      ack_seen  <= 1'b0;
      resp_read <= 1'b0;
      resp      <= RESP_OKAY;
      rdata     <= '0;
    end else begin
      unique case (state)
        ST_IDLE: begin
          if (take_rd || take_wr) begin
            resp_read <= take_rd;
            if (dec_hit) begin
              req_o.addr  <= dec_addr;
              req_o.wdata <= take_rd ? '0 : w_data;
              req_o.strb  <= take_rd ? '0 : w_strb;
              req_o.prot  <= take_rd ? s_axi_arprot : aw_prot;
              req_o.write <= take_wr;
              req_o.sel   <= dec_sel;
              req_tgl_o   <= !req_tgl_o;
              state       <= ST_APB;
            end else begin
              // no peripheral at this address: not forwarded
              resp  <= RESP_DECERR;
              rdata <= '0;
              state <= ST_RESP;
            end
          end
        end
        ST_APB: begin
          if (ack_pulse) begin
            ack_seen <= ack_sync;
            resp     <= rsp_i.slverr ? RESP_SLVERR : RESP_OKAY;
            rdata    <= resp_read ? rsp_i.rdata : '0;
            state    <= ST_RESP;
          end
        end
        ST_RESP: begin
          if ((resp_read && s_axi_rready) || (!resp_read && s_axi_bready))
            state <= ST_IDLE;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  // AXI rule: a response, once valid, stays valid and unchanged until taken.
  a_b_hold: assert property (@(posedge aclk) disable iff (!aresetn)
    s_axi_bvalid && !s_axi_bready |=> s_axi_bvalid && $stable(s_axi_bresp));
  a_r_hold: assert property (@(posedge aclk) disable iff (!aresetn)
    s_axi_rvalid && !s_axi_rready |=> s_axi_rvalid && $stable(s_axi_rresp) && $stable(s_axi_rdata));
  a_one_resp: assert property (@(posedge aclk) disable iff (!aresetn)
    !(s_axi_bvalid && s_axi_rvalid));

endmodule
