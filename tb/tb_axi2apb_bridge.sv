// tb_axi2apb_bridge: end-to-end testbench of the AXI4-Lite to APB bridge at its
// default parameters (16 peripheral slots of 4 KiB at 0x4000_0000, two-flop
// synchronisers).
//
// The testbench is the AXI4-Lite master on ACLK; sixteen behavioural APB
// peripherals on PCLK answer with 0 to 3 random wait states, and with PSLVERR
// at addresses whose bits [11:8] are all ones. The run has three phases with
// different clock relations: PCLK slower than ACLK, PCLK faster, and equal
// periods with a phase offset. Random reads and writes (address before data,
// data before address, or both at once; BREADY / RREADY stalled at random)
// hit every slot, error locations and unmapped addresses. Each response is
// compared with a shadow copy of the peripherals; an APB monitor checks that
// each mapped transfer appears on APB exactly once with the right address,
// slot, data, strobes and protection, and that unmapped ones never do; each
// read's latency must lie within the bound set by the synchronisers and the
// APB sequence. A read and a write waiting together must go out read first.
// The run fails if any of these never happened: read, write, wait state,
// SLVERR, DECERR, read priority, B stall, R stall, each write ordering, each
// clock phase.
module tb_axi2apb_bridge;
  import axi2apb_pkg::*;

  localparam int unsigned N = 16;

  realtime    ta_half = 5.0, tp_half = 11.5;
  logic       aclk = 1'b0, pclk = 1'b0;
  logic       aresetn, presetn;
  addr_t      awaddr, araddr;
  logic [2:0] awprot, arprot;
  logic       awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  data_t      wdata, rdata;
  strb_t      wstrb;
  logic [1:0] bresp, rresp;
  addr_t      paddr;
  logic [N-1:0] psel, pready, pslverr;
  logic       penable, pwrite;
  data_t      pwdata;
  strb_t      pstrb;
  logic [2:0] pprot;
  data_t      prdata [N];
  int unsigned waits [N];
  int unsigned xfers [N];

  typedef struct packed {
    addr_t      addr;
    logic       write;
    data_t      wdata;
    strb_t      strb;
    logic [2:0] prot;
  } xfer_t;

  data_t shadow [N][16];
  xfer_t seen [$];
  int checks = 0, failures = 0;
  int n_rd = 0, n_wr = 0, n_decerr = 0, n_slverr = 0, n_prio = 0;
  int n_aw_first = 0, n_w_first = 0, n_both = 0, n_bstall = 0, n_rstall = 0;
  int n_phase [3] = '{0, 0, 0};
  int phase = 0;

  axi2apb_bridge dut (
    .aclk(aclk), .aresetn(aresetn),
    .s_axi_awaddr(awaddr), .s_axi_awprot(awprot), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arprot(arprot), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .pclk(pclk), .presetn(presetn),
    .m_apb_paddr(paddr), .m_apb_psel(psel), .m_apb_penable(penable), .m_apb_pwrite(pwrite),
    .m_apb_pwdata(pwdata), .m_apb_pstrb(pstrb), .m_apb_pprot(pprot),
    .m_apb_prdata(prdata), .m_apb_pready(pready), .m_apb_pslverr(pslverr)
  );

  for (genvar s = 0; s < N; s++) begin : g_slv
    apb_slave_model #(.SLOT(s)) u_slv (
      .pclk(pclk), .presetn(presetn), .psel(psel[s]), .penable(penable),
      .pwrite(pwrite), .paddr(paddr), .pwdata(pwdata), .pstrb(pstrb),
      .prdata(prdata[s]), .pready(pready[s]), .pslverr(pslverr[s]),
      .wait_cfg(3), .wait_rand(1'b1), .waits(waits[s]), .xfers(xfers[s])
    );
  end

  always #(ta_half) aclk = ~aclk;
  initial begin
    #3;
    forever #(tp_half) pclk = ~pclk;
  end

  initial begin
    repeat (400000) @(posedge aclk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // ---- APB monitor: record every SETUP cycle ----
  always @(posedge pclk) begin
    if (presetn && psel != '0 && !penable) begin
      xfer_t x;
      x.addr = paddr; x.write = pwrite; x.wdata = pwdata; x.strb = pstrb; x.prot = pprot;
      seen.push_back(x);
      checks++;
      if (psel != (N'(1) << paddr[15:12])) begin
        failures++;
        $display("FAIL PSEL %b does not match PADDR %h", psel, paddr);
      end
    end
  end

  function automatic logic mapped(addr_t a);
    return a >= 32'h4000_0000 && a < 32'h4001_0000;
  endfunction

  function automatic logic err_loc(addr_t a);
    return a[11:8] == 4'hF;
  endfunction

  function automatic logic [1:0] exp_resp(addr_t a);
    if (!mapped(a)) return RESP_DECERR;
    return err_loc(a) ? RESP_SLVERR : RESP_OKAY;
  endfunction

  // ---- AXI master channel tasks (drive on negedge, handshake at posedge) ----
  task automatic put_aw(addr_t a, logic [2:0] p);
    logic ok;
    @(negedge aclk);
    awaddr = a; awprot = p; awvalid = 1'b1;
    forever begin
      #1 ok = awready;
      @(posedge aclk);
      if (ok) break;
      @(negedge aclk);
    end
    @(negedge aclk) awvalid = 1'b0;
  endtask

  task automatic put_w(data_t d, strb_t s);
    logic ok;
    @(negedge aclk);
    wdata = d; wstrb = s; wvalid = 1'b1;
    forever begin
      #1 ok = wready;
      @(posedge aclk);
      if (ok) break;
      @(negedge aclk);
    end
    @(negedge aclk) wvalid = 1'b0;
  endtask

  task automatic put_ar(addr_t a, logic [2:0] p, output realtime t_hs);
    logic ok;
    @(negedge aclk);
    araddr = a; arprot = p; arvalid = 1'b1;
    forever begin
      #1 ok = arready;
      @(posedge aclk);
      if (ok) break;
      @(negedge aclk);
    end
    t_hs = $realtime;
    @(negedge aclk) arvalid = 1'b0;
  endtask

  task automatic get_b(int stall, output logic [1:0] resp);
    logic v;
    int held = 0;
    forever begin
      @(negedge aclk);
      #1 v = bvalid;
      if (v && held >= stall) begin
        bready = 1'b1;
        resp   = bresp;
        @(posedge aclk);
        @(negedge aclk) bready = 1'b0;
        break;
      end
      if (v) held++;
    end
    if (stall > 0) n_bstall++;
  endtask

  task automatic get_r(int stall, output logic [1:0] resp, output data_t d, output realtime t_valid);
    logic v;
    int held = 0;
    forever begin
      @(negedge aclk);
      #1 v = rvalid;
      if (v && held == 0) t_valid = $realtime;
      if (v && held >= stall) begin
        rready = 1'b1;
        resp   = rresp;
        d      = rdata;
        @(posedge aclk);
        @(negedge aclk) rready = 1'b0;
        break;
      end
      if (v) held++;
    end
    if (stall > 0) n_rstall++;
  endtask

  // the monitor must have seen exactly this transfer, or nothing if unmapped
  task automatic check_apb(addr_t a, logic wr, data_t d, strb_t s, logic [2:0] p);
    xfer_t x;
    if (!mapped(a)) begin
      check(seen.size() == 0, $sformatf("unmapped %h stayed off APB", a));
      seen.delete();
      return;
    end
    check(seen.size() == 1, $sformatf("one APB transfer for %h, saw %0d", a, seen.size()));
    if (seen.size() == 0) return;
    x = seen.pop_front();
    seen.delete();
    check(x.addr == a && x.write == wr && x.prot == p && (!wr || (x.wdata == d && x.strb == s))
          && (wr || x.strb == '0), $sformatf("APB transfer matches AXI request %h", a));
  endtask

  function automatic addr_t rand_addr();
    int k;
    k = $urandom_range(0, 9);
    if (k == 0) return $urandom & 32'hFFFF_FFFC;
    if (k == 1) return 32'h4000_0F00 + ($urandom_range(0, 15) << 12) + ($urandom_range(0, 15) << 2);
    return 32'h4000_0000 + ($urandom_range(0, 15) << 12) + ($urandom_range(0, 15) << 2);
  endfunction

  task automatic do_write(addr_t a, int order);
    data_t d;
    strb_t s;
    logic [2:0] p;
    logic [1:0] resp, er;
    d  = $urandom;
    s  = 4'($urandom_range(1, 15));
    p  = 3'($urandom);
    er = exp_resp(a);
    case (order)
      0: begin put_aw(a, p); repeat ($urandom_range(0, 3)) @(negedge aclk); put_w(d, s); n_aw_first++; end
      1: begin put_w(d, s); repeat ($urandom_range(0, 3)) @(negedge aclk); put_aw(a, p); n_w_first++; end
      default: begin fork put_aw(a, p); put_w(d, s); join n_both++; end
    endcase
    get_b($urandom_range(0, 1) ? 0 : $urandom_range(1, 4), resp);
    check(resp == er, $sformatf("BRESP %0d for %h, expected %0d", resp, a, er));
    if (er == RESP_OKAY)
      for (int b = 0; b < 4; b++)
        if (s[b]) shadow[a[15:12]][a[5:2]][8*b +: 8] = d[8*b +: 8];
    if (er == RESP_DECERR) n_decerr++;
    if (er == RESP_SLVERR) n_slverr++;
    check_apb(a, 1'b1, d, s, p);
    n_wr++;
  endtask

  task automatic do_read(addr_t a, int stall);
    logic [2:0] p;
    logic [1:0] resp, er;
    data_t d, ed;
    realtime t0, t1, bound;
    p  = 3'($urandom);
    er = exp_resp(a);
    ed = (er == RESP_DECERR) ? '0 : shadow[a[15:12]][a[5:2]];
    put_ar(a, p, t0);
    get_r(stall, resp, d, t1);
    check(resp == er, $sformatf("RRESP %0d for %h, expected %0d", resp, a, er));
    if (er != RESP_SLVERR) check(d == ed, $sformatf("RDATA %h for %h, expected %h", d, a, ed));
    if (er == RESP_OKAY || er == RESP_SLVERR) begin
      // request sync (<= 3 PCLK) + SETUP + ENABLE with <= 3 waits + ack sync (<= 3 ACLK) + 1
      bound = 2 * tp_half * 9 + 2 * ta_half * 4 + 2;
      check(t1 - t0 <= bound && t1 - t0 >= 2 * tp_half * 3,
            $sformatf("read latency %0t outside [%0t, %0t]", t1 - t0, 2 * tp_half * 3, bound));
    end
    if (er == RESP_DECERR) n_decerr++;
    if (er == RESP_SLVERR) n_slverr++;
    check_apb(a, 1'b0, '0, '0, p);
    n_rd++;
  endtask

  // A read held by RREADY low; meanwhile a complete write and a second read
  // arrive. Once the first read is taken the second read must go to APB
  // before the write.
  task automatic do_priority();
    addr_t ra1, ra2, wa;
    data_t wd, d, ed2;
    logic [1:0] resp;
    realtime t0, t1;
    xfer_t x;
    ra1 = 32'h4000_0000 + ($urandom_range(0, 15) << 12);
    ra2 = 32'h4000_0004 + ($urandom_range(0, 15) << 12);
    wa  = 32'h4000_0008 + ($urandom_range(0, 15) << 12);
    wd  = $urandom;
    put_ar(ra1, 3'b000, t0);
    wait (rvalid);
    fork
      put_aw(wa, 3'b001);
      put_w(wd, 4'hF);
    join
    ed2 = shadow[ra2[15:12]][ra2[5:2]];
    fork
      put_ar(ra2, 3'b010, t0);
      begin
        repeat (3) @(negedge aclk);
        get_r(0, resp, d, t1);
        get_r(0, resp, d, t1);
        check(resp == RESP_OKAY && d == ed2, "second read returns the value from before the write");
      end
      begin
        logic [1:0] bres;
        get_b(0, bres);
        check(bres == RESP_OKAY, "queued write completes OKAY");
      end
    join
    shadow[wa[15:12]][wa[5:2]] = wd;
    @(negedge aclk);
    check(seen.size() == 3, $sformatf("three APB transfers, saw %0d", seen.size()));
    if (seen.size() == 3) begin
      x = seen.pop_front(); check(x.addr == ra1 && !x.write, "APB order 1: first read");
      x = seen.pop_front(); check(x.addr == ra2 && !x.write, "APB order 2: waiting read before write");
      x = seen.pop_front(); check(x.addr == wa && x.write, "APB order 3: the write");
    end
    seen.delete();
    n_prio++;
  endtask

  initial begin
    int unsigned total_waits, total_xfers;
    aresetn = 1'b0;
    presetn = 1'b0;
    {awvalid, wvalid, arvalid, bready, rready} = '0;
    awaddr = '0; araddr = '0; awprot = '0; arprot = '0; wdata = '0; wstrb = '0;
    for (int s = 0; s < N; s++)
      for (int w = 0; w < 16; w++) shadow[s][w] = 32'hA000_0000 | (s << 16) | w;
    #100;
    @(negedge aclk) aresetn = 1'b1;
    presetn = 1'b1;
    for (phase = 0; phase < 3; phase++) begin
      // change clocks only while the bridge is idle
      repeat (10) @(negedge aclk);
      case (phase)
        0: begin ta_half = 5.0; tp_half = 11.5; end   // PCLK slower
        1: begin ta_half = 5.0; tp_half = 3.5;  end   // PCLK faster
        default: begin ta_half = 6.5; tp_half = 6.5; end  // same period, offset phase
      endcase
      repeat (10) @(negedge aclk);
      seen.delete();
      for (int s = 0; s < N; s++) do_read(32'h4000_0000 + (s << 12) + (s << 2), 0);
      for (int i = 0; i < 250; i++) begin
        addr_t a;
        a = rand_addr();
        if ($urandom_range(0, 1)) do_write(a, $urandom_range(0, 2));
        else                      do_read(a, $urandom_range(0, 1) ? 0 : $urandom_range(1, 4));
        n_phase[phase]++;
      end
      for (int i = 0; i < 3; i++) do_priority();
    end
    total_waits = 0;
    total_xfers = 0;
    for (int s = 0; s < N; s++) begin
      total_waits += waits[s];
      total_xfers += xfers[s];
    end
    $display("reads=%0d writes=%0d decerr=%0d slverr=%0d wait_cycles=%0d apb_xfers=%0d priority=%0d",
             n_rd, n_wr, n_decerr, n_slverr, total_waits, total_xfers, n_prio);
    $display("aw_first=%0d w_first=%0d together=%0d bstall=%0d rstall=%0d phases=%0d/%0d/%0d",
             n_aw_first, n_w_first, n_both, n_bstall, n_rstall, n_phase[0], n_phase[1], n_phase[2]);
    check(n_rd > 0, "reads happened");
    check(n_wr > 0, "writes happened");
    check(total_waits > 0, "APB wait states happened");
    check(n_slverr > 0, "SLVERR happened");
    check(n_decerr > 0, "DECERR happened");
    check(n_prio > 0, "read priority happened");
    check(n_bstall > 0 && n_rstall > 0, "response stalls happened");
    check(n_aw_first > 0 && n_w_first > 0 && n_both > 0, "all write orderings happened");
    check(n_phase[0] > 0 && n_phase[1] > 0 && n_phase[2] > 0, "all clock phases ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
