// tb_axi_slave_fsm: self-checking testbench for the ACLK-domain AXI4-Lite slave.
//
// The testbench is the AXI4-Lite master and also plays the PCLK side on the
// same clock: it records every forwarded request word, waits 1 to 6 cycles,
// answers from a shadow memory (PSLVERR at addresses with bits [11:8] all
// ones) and flips the acknowledge toggle. It checks:
//   - read data and OKAY / SLVERR / DECERR responses against its own address
//     arithmetic and shadow memory;
//   - that each forwarded request carries the right address, data, strobes,
//     protection, direction and slot, and that unmapped addresses are never
//     forwarded;
//   - writes with the address before the data, the data before the address
//     and both together;
//   - BVALID / RVALID held while the master stalls BREADY / RREADY;
//   - read priority: with a read and a complete write both waiting when the
//     bridge becomes free, the read is forwarded first.
module tb_axi_slave_fsm;
  import axi2apb_pkg::*;

  logic       aclk = 1'b0;
  logic       aresetn;
  addr_t      awaddr, araddr;
  logic [2:0] awprot, arprot;
  logic       awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  data_t      wdata, rdata;
  strb_t      wstrb;
  logic [1:0] bresp, rresp;
  apb_req_t   req;
  logic       req_tgl, ack_tgl;
  apb_rsp_t   rsp;

  data_t      shadow [addr_t];
  apb_req_t   fwd [$];
  int checks = 0, failures = 0;
  int n_decerr = 0, n_slverr = 0, n_prio = 0, n_aw_first = 0, n_w_first = 0, n_both = 0;
  int n_bstall = 0, n_rstall = 0;

  axi_slave_fsm dut (
    .aclk(aclk), .aresetn(aresetn),
    .s_axi_awaddr(awaddr), .s_axi_awprot(awprot), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arprot(arprot), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .req_o(req), .req_tgl_o(req_tgl), .ack_tgl_i(ack_tgl), .rsp_i(rsp)
  );

  always #5 aclk = ~aclk;

  initial begin
    repeat (200000) @(posedge aclk);
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

  function automatic data_t mem_rd(addr_t a);
    addr_t wa = {a[31:2], 2'b00};
    return shadow.exists(wa) ? shadow[wa] : (wa ^ 32'h5A5A_5A5A);
  endfunction

  function automatic logic mapped(addr_t a);
    return a >= 32'h4000_0000 && a < 32'h4001_0000;
  endfunction

  function automatic logic err_loc(addr_t a);
    return a[11:8] == 4'hF;
  endfunction

  // ---- PCLK side played by the testbench ----
  initial begin
    logic seen;
    apb_req_t r;
    ack_tgl = 1'b0;
    rsp     = '0;
    seen    = 1'b0;
    forever begin
      @(posedge aclk); #1;
      if (req_tgl != seen) begin
        seen = req_tgl;
        r    = req;
        fwd.push_back(r);
        repeat ($urandom_range(1, 6)) @(posedge aclk);
        @(negedge aclk);
        rsp.slverr = err_loc(r.addr);
        rsp.rdata  = r.write ? '0 : mem_rd(r.addr);
        if (r.write && !rsp.slverr) begin
          data_t d = mem_rd(r.addr);
          for (int b = 0; b < 4; b++) if (r.strb[b]) d[8*b +: 8] = r.wdata[8*b +: 8];
          shadow[{r.addr[31:2], 2'b00}] = d;
        end
        ack_tgl = !ack_tgl;
      end
    end
  end

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

  task automatic put_ar(addr_t a, logic [2:0] p);
    logic ok;
    @(negedge aclk);
    araddr = a; arprot = p; arvalid = 1'b1;
    forever begin
      #1 ok = arready;
      @(posedge aclk);
      if (ok) break;
      @(negedge aclk);
    end
    @(negedge aclk) arvalid = 1'b0;
  endtask

  // take the write response; stall BREADY for 'stall' cycles once BVALID is seen
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

  task automatic get_r(int stall, output logic [1:0] resp, output data_t d);
    logic v;
    int held = 0;
    data_t first_d;
    forever begin
      @(negedge aclk);
      #1 v = rvalid;
      if (v && held == 0) first_d = rdata;
      if (v) check(rdata == first_d, "RDATA held while RREADY low");
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

  function automatic logic [1:0] exp_resp(addr_t a);
    if (!mapped(a)) return RESP_DECERR;
    return err_loc(a) ? RESP_SLVERR : RESP_OKAY;
  endfunction

  task automatic check_fwd(addr_t a, logic wr, data_t d, strb_t s, logic [2:0] p);
    apb_req_t r;
    if (!mapped(a)) begin
      check(fwd.size() == 0, $sformatf("unmapped address %h not forwarded", a));
      fwd.delete();
      return;
    end
    check(fwd.size() == 1, $sformatf("exactly one request forwarded for %h", a));
    if (fwd.size() == 0) return;
    r = fwd.pop_front();
    check(r.addr == a && r.write == wr && r.prot == p && int'(r.sel) == int'(a[15:12])
          && (!wr || (r.wdata == d && r.strb == s)) && (wr || r.strb == '0),
          $sformatf("forwarded request for %h", a));
  endtask

  function automatic addr_t rand_addr();
    int k = $urandom_range(0, 9);
    if (k == 0) return $urandom & 32'hFFFF_FFFC;            // mostly unmapped
    if (k == 1) return 32'h4000_0F00 + ($urandom_range(0, 15) << 12) + ($urandom_range(0, 63) << 2);
    return 32'h4000_0000 + ($urandom_range(0, 15) << 12) + ($urandom_range(0, 7) << 2);
  endfunction

  task automatic do_write(addr_t a, int order);
    data_t d = $urandom;
    strb_t s = 4'($urandom_range(1, 15));
    logic [2:0] p = 3'($urandom);
    logic [1:0] resp;
    logic [1:0] er = exp_resp(a);
    case (order)
      0: begin put_aw(a, p); repeat ($urandom_range(0, 3)) @(negedge aclk); put_w(d, s); n_aw_first++; end
      1: begin put_w(d, s); repeat ($urandom_range(0, 3)) @(negedge aclk); put_aw(a, p); n_w_first++; end
      default: begin fork put_aw(a, p); put_w(d, s); join n_both++; end
    endcase
    get_b($urandom_range(0, 1) ? 0 : $urandom_range(1, 4), resp);
    check(resp == er, $sformatf("BRESP %0d for %h, expected %0d", resp, a, er));
    if (er == RESP_DECERR) n_decerr++;
    if (er == RESP_SLVERR) n_slverr++;
    check_fwd(a, 1'b1, d, s, p);
  endtask

  task automatic do_read(addr_t a);
    logic [2:0] p = 3'($urandom);
    logic [1:0] resp;
    data_t d;
    logic [1:0] er = exp_resp(a);
    data_t ed = (er == RESP_OKAY || er == RESP_SLVERR) ? mem_rd(a) : '0;
    put_ar(a, p);
    get_r($urandom_range(0, 1) ? 0 : $urandom_range(1, 4), resp, d);
    check(resp == er, $sformatf("RRESP %0d for %h, expected %0d", resp, a, er));
    if (er == RESP_OKAY) check(d == ed, $sformatf("RDATA %h for %h, expected %h", d, a, ed));
    if (er == RESP_DECERR) begin check(d == '0, "RDATA zero on DECERR"); n_decerr++; end
    if (er == RESP_SLVERR) n_slverr++;
    check_fwd(a, 1'b0, '0, '0, p);
  endtask

  // A read is held in RESP by RREADY low while a write and a second read
  // arrive; when the first read is taken both are pending and the read
  // must be forwarded before the write.
  task automatic do_priority();
    addr_t ra1 = 32'h4000_3010, ra2 = 32'h4000_5020, wa = 32'h4000_7030;
    data_t wd = $urandom;
    logic [1:0] resp;
    data_t d;
    apb_req_t r;
    put_ar(ra1, 3'b000);
    wait (rvalid);
    fork
      begin put_aw(wa, 3'b001); end
      begin put_w(wd, 4'hF); end
    join
    check(!awready && !wready, "write buffered while a read response is held");
    fork
      put_ar(ra2, 3'b010);
      begin
        repeat (3) @(negedge aclk);
        get_r(0, resp, d);
        get_r(0, resp, d);
        check(d == mem_rd(ra2), "second read data");
      end
      begin
        logic [1:0] bres;
        get_b(0, bres);
        check(bres == RESP_OKAY, "buffered write completes OKAY");
      end
    join
    check(fwd.size() == 3, "three requests forwarded");
    if (fwd.size() == 3) begin
      r = fwd.pop_front(); check(r.addr == ra1 && !r.write, "first forwarded: first read");
      r = fwd.pop_front(); check(r.addr == ra2 && !r.write, "second forwarded: the read, ahead of the write");
      r = fwd.pop_front(); check(r.addr == wa && r.write && r.wdata == wd, "third forwarded: the write");
    end
    fwd.delete();
    n_prio++;
  endtask

  initial begin
    aresetn = 1'b0;
    {awvalid, wvalid, arvalid, bready, rready} = '0;
    awaddr = '0; araddr = '0; awprot = '0; arprot = '0; wdata = '0; wstrb = '0;
    repeat (3) @(posedge aclk);
    @(negedge aclk) aresetn = 1'b1;
    check(awready && wready && arready && !bvalid && !rvalid, "ready and idle after reset");
    for (int i = 0; i < 600; i++) begin
      addr_t a;
      a = rand_addr();
      if ($urandom_range(0, 1)) do_write(a, $urandom_range(0, 2));
      else                      do_read(a);
    end
    for (int i = 0; i < 5; i++) do_priority();
    check(n_decerr > 0 && n_slverr > 0 && n_prio > 0 && n_aw_first > 0 && n_w_first > 0
          && n_both > 0 && n_bstall > 0 && n_rstall > 0, "every mechanism exercised");
    $display("decerr=%0d slverr=%0d priority=%0d aw_first=%0d w_first=%0d together=%0d bstall=%0d rstall=%0d",
             n_decerr, n_slverr, n_prio, n_aw_first, n_w_first, n_both, n_bstall, n_rstall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
