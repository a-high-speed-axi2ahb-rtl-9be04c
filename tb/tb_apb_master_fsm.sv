// tb_apb_master_fsm: self-checking testbench for the PCLK-domain APB master.
//
// The testbench plays the ACLK side on the same clock: it loads a request
// word, flips the request toggle, and waits for the acknowledge toggle. Sixteen
// behavioural APB peripherals sit on the bus with a fixed number of wait
// states per transfer, chosen at random from 0 to 5. For every transfer it
// checks, cycle by cycle:
//   - SETUP starts exactly SYNC_STAGES+1 = 3 clock edges after the toggle;
//   - SETUP has only the addressed PSEL high, PENABLE low, and PADDR, PWRITE,
//     PWDATA, PSTRB, PPROT equal to the request;
//   - ENABLE lasts exactly 1 + (wait states) cycles and the acknowledge
//     toggles at its end, after which PSEL drops;
//   - the returned read data match a shadow copy of the peripherals kept by
//     the testbench, and PSLVERR is reported for error locations.
module tb_apb_master_fsm;
  import axi2apb_pkg::*;

  localparam int unsigned N = 16;

  logic        pclk = 1'b0;
  logic        presetn;
  logic        req_tgl;
  apb_req_t    req;
  logic        ack_tgl;
  apb_rsp_t    rsp;
  addr_t       paddr;
  logic [N-1:0] psel;
  logic        penable, pwrite;
  data_t       pwdata;
  strb_t       pstrb;
  logic [2:0]  pprot;
  data_t       prdata [N];
  logic [N-1:0] pready, pslverr;
  int unsigned wait_cfg;
  int unsigned waits [N];
  int unsigned xfers [N];

  data_t shadow [N][16];
  int checks = 0, failures = 0;
  int n_wait_xfers = 0, n_err = 0, n_rd = 0, n_wr = 0;

  apb_master_fsm dut (
    .pclk(pclk), .presetn(presetn),
    .req_tgl_i(req_tgl), .req_i(req), .ack_tgl_o(ack_tgl), .rsp_o(rsp),
    .m_apb_paddr(paddr), .m_apb_psel(psel), .m_apb_penable(penable),
    .m_apb_pwrite(pwrite), .m_apb_pwdata(pwdata), .m_apb_pstrb(pstrb),
    .m_apb_pprot(pprot), .m_apb_prdata(prdata), .m_apb_pready(pready),
    .m_apb_pslverr(pslverr)
  );

  for (genvar s = 0; s < N; s++) begin : g_slv
    apb_slave_model #(.SLOT(s)) u_slv (
      .pclk(pclk), .presetn(presetn), .psel(psel[s]), .penable(penable),
      .pwrite(pwrite), .paddr(paddr), .pwdata(pwdata), .pstrb(pstrb),
      .prdata(prdata[s]), .pready(pready[s]), .pslverr(pslverr[s]),
      .wait_cfg(wait_cfg), .wait_rand(1'b0), .waits(waits[s]), .xfers(xfers[s])
    );
  end

  always #5 pclk = ~pclk;

  initial begin
    repeat (50000) @(posedge pclk);
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

  task automatic transfer(input int unsigned sel, input logic wr, input logic err, input int unsigned nwait);
    apb_req_t r;
    int unsigned word, edges;
    logic ack0;
    logic [N-1:0] onehot;
    data_t expd;
    word     = $urandom_range(0, 15);
    r.addr   = 32'h4000_0000 + sel * 32'h1000 + (err ? 32'hF00 : 32'h0) + word * 4;
    r.write  = wr;
    r.wdata  = wr ? $urandom : '0;
    r.strb   = wr ? 4'($urandom_range(1, 15)) : '0;
    r.prot   = 3'($urandom);
    r.sel    = idx_t'(sel);
    onehot   = '0;
    onehot[sel] = 1'b1;
    wait_cfg = nwait;
    @(negedge pclk);
    req     = r;
    req_tgl = !req_tgl;
    ack0    = ack_tgl;
    edges   = 0;
    do begin
      @(posedge pclk); #1;
      edges++;
    end while (psel == '0 && edges < 20);
    check(edges == 3, $sformatf("SETUP %0d edges after request, expected 3", edges));
    check(psel == onehot && !penable, "SETUP phase: PSEL one-hot, PENABLE low");
    check(paddr == r.addr && pwrite == r.write && pwdata == r.wdata && pstrb == r.strb
          && pprot == r.prot, "SETUP phase: address and control equal the request");
    @(posedge pclk); #1;
    edges = 0;   // ENABLE cycles completed so far
    check(penable && psel == onehot, "ENABLE phase follows SETUP");
    while (ack_tgl == ack0 && edges < 20) begin
      check(penable && psel == onehot && paddr == r.addr, "PENABLE and PSEL held during wait states");
      @(posedge pclk); #1;
      edges++;
    end
    check(edges == nwait + 1, $sformatf("ENABLE lasted %0d cycles, expected %0d", edges, nwait + 1));
    check(ack_tgl != ack0, "acknowledge toggled");
    check(psel == '0 && !penable, "bus idle after transfer");
    check(rsp.slverr == err, "PSLVERR returned");
    if (!wr) begin
      expd = shadow[sel][word];
      check(rsp.rdata == expd, $sformatf("read data %h expected %h", rsp.rdata, expd));
      n_rd++;
    end else begin
      if (!err)
        for (int b = 0; b < 4; b++)
          if (r.strb[b]) shadow[sel][word][8*b +: 8] = r.wdata[8*b +: 8];
      n_wr++;
    end
    if (err) n_err++;
    if (nwait > 0) n_wait_xfers++;
  endtask

  initial begin
    int unsigned total_waits, total_xfers;
    presetn  = 1'b0;
    req_tgl  = 1'b0;
    req      = '0;
    wait_cfg = 0;
    for (int s = 0; s < N; s++)
      for (int w = 0; w < 16; w++) shadow[s][w] = 32'hA000_0000 | (s << 16) | w;
    repeat (3) @(posedge pclk);
    @(negedge pclk);
    presetn = 1'b1;
    check(psel == '0 && !penable, "bus idle after reset");
    for (int s = 0; s < N; s++) transfer(s, 1'b0, 1'b0, 0);
    for (int i = 0; i < 400; i++)
      transfer($urandom_range(0, N - 1), 1'($urandom), ($urandom_range(0, 7) == 0), $urandom_range(0, 5));
    total_waits = 0;
    total_xfers = 0;
    for (int s = 0; s < N; s++) begin
      total_waits += waits[s];
      total_xfers += xfers[s];
    end
    check(total_xfers == 416, $sformatf("peripherals saw %0d transfers, expected 416", total_xfers));
    check(n_wait_xfers > 0 && n_err > 0 && n_rd > 0 && n_wr > 0, "all kinds of transfer occurred");
    $display("reads=%0d writes=%0d slverr=%0d with_waits=%0d wait_cycles=%0d",
             n_rd, n_wr, n_err, n_wait_xfers, total_waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
