// apb_master_fsm: the PCLK-domain half of the AXI4-Lite to APB bridge.
//
// It is the APB master. A new request is signalled by a flip of req_tgl_i,
// which arrives from the ACLK domain through a two-flop synchroniser; the
// request word req_i has been stable since before the flip. The FSM copies it
// into its own registers and runs one APB transfer:
//   IDLE   - no transfer; PSEL and PENABLE low.
//   SETUP  - one cycle with the selected PSEL high and PENABLE low.
//   ENABLE - PENABLE high; stays here while the selected peripheral holds
//            PREADY low (wait states).
// In the last ENABLE cycle (PREADY high) PRDATA and PSLVERR of the selected
// peripheral are captured into rsp_o and ack_tgl_o flips; rsp_o then holds
// until the next transfer ends. PSEL is one-hot over NUM_SLV peripherals and
// each peripheral has its own PRDATA, PREADY and PSLVERR, multiplexed by slot.
//
// Timing: SYNC_STAGES+1 PCLK cycles from the request flip reaching this
// domain to SETUP, then 2 + (wait states) PCLK cycles of APB transfer. The
// IDLE/SETUP/ENABLE sequence, PREADY wait states, PSLVERR reporting and up to
// 16 peripherals follow the design's specification; the per-slot read-back
// buses and the toggle handshake are this design's choices. Reset (presetn)
// is asynchronous, active low. The assertions use presetn in 'disable iff',
// which lint reports as a reset used both asynchronously and synchronously;
// that is intended.
module apb_master_fsm
  import axi2apb_pkg::*;
#(
  parameter int unsigned NUM_SLV     = 16,
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic               pclk,
  input  logic               presetn,
  // from / to the ACLK domain
  input  logic               req_tgl_i,   // unsynchronised
  input  apb_req_t           req_i,       // stable when req_tgl_i has flipped
  output logic               ack_tgl_o,
  output apb_rsp_t           rsp_o,
  // APB master
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

  typedef enum logic [1:0] {ST_IDLE, ST_SETUP, ST_ENABLE} state_e;

  state_e   state;
  apb_req_t cur;
  logic     req_sync, req_seen, req_pulse;
  logic     sel_ready;

  sync2 #(.WIDTH(1), .STAGES(SYNC_STAGES)) u_req_sync (
    .clk  (pclk),
    .rst_n(presetn),
    .d    (req_tgl_i),
    .q    (req_sync)
  );

  assign req_pulse = (req_sync != req_seen);
  assign sel_ready = m_apb_pready[cur.sel];

  always_ff @(posedge pclk or negedge presetn) begin
    if (!presetn) begin
      state     <= ST_IDLE;
      cur       <= '0;
      req_seen  <= 1'b0;
      ack_tgl_o <= 1'b0;
      rsp_o     <= '0;
    end else begin
      unique case (state)
        ST_IDLE: begin
          if (req_pulse) begin
            req_seen <= req_sync;
            cur      <= req_i;
            state    <= ST_SETUP;
          end
        end
        ST_SETUP: state <= ST_ENABLE;
        ST_ENABLE: begin
          if (sel_ready) begin
            rsp_o.rdata  <= cur.write ? '0 : m_apb_prdata[cur.sel];
            rsp_o.slverr <= m_apb_pslverr[cur.sel];
            ack_tgl_o    <= !ack_tgl_o;
            state        <= ST_IDLE;
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  always_comb begin
    m_apb_psel = '0;
    if (state != ST_IDLE) m_apb_psel[cur.sel] = 1'b1;
  end

  assign m_apb_penable = (state == ST_ENABLE);
  assign m_apb_paddr   = cur.addr;
  assign m_apb_pwrite  = cur.write;
  assign m_apb_pwdata  = cur.wdata;
  assign m_apb_pstrb   = cur.strb;
  assign m_apb_pprot   = cur.prot;

  // APB rules: PENABLE only with a PSEL; SETUP lasts one cycle; the transfer
  // holds its address and control through wait states.
  a_en_sel: assert property (@(posedge pclk) disable iff (!presetn)
    m_apb_penable |-> (m_apb_psel != '0));
  a_setup: assert property (@(posedge pclk) disable iff (!presetn)
    (m_apb_psel != '0) && !m_apb_penable |=> m_apb_penable && $stable(m_apb_psel));
  a_wait: assert property (@(posedge pclk) disable iff (!presetn)
    m_apb_penable && !sel_ready |=> m_apb_penable && $stable(m_apb_paddr)
                                    && $stable(m_apb_pwrite) && $stable(m_apb_psel));

  initial assert (NUM_SLV >= 1 && NUM_SLV <= MAX_SLV)
    else $error("apb_master_fsm: NUM_SLV must be 1..%0d", MAX_SLV);

endmodule
