// tb_addr_decoder: self-checking testbench for the bridge's address map.
//
// Two decoders are checked against a reference computed with plain address
// arithmetic (base <= addr < base + slots * slot size, slot = offset / size):
// the default one (16 slots of 4 KiB at 0x4000_0000, all present) and one with
// 5 slots of 256 bytes at 0x1000_0000 of which slots 1 and 3 are absent.
// Directed addresses cover each slot's first and last byte and the bytes just
// outside the window; random addresses follow, half of them inside the window.
module tb_addr_decoder;
  import axi2apb_pkg::*;

  localparam addr_t       B_BASE    = 32'h1000_0000;
  localparam int unsigned B_NUM     = 5;
  localparam int unsigned B_BITS    = 8;
  localparam logic [15:0] B_PRESENT = 16'b1111_1111_1111_0101;

  addr_t addr;
  logic  hit_a, hit_b;
  idx_t  sel_a, sel_b;
  int    checks = 0, failures = 0;
  logic  clk = 1'b0;

  addr_decoder dut_a (.addr(addr), .hit(hit_a), .sel(sel_a));
  addr_decoder #(
    .NUM_SLV(B_NUM), .SLV_ADDR_BITS(B_BITS), .BASE_ADDR(B_BASE), .SLV_PRESENT(B_PRESENT)
  ) dut_b (.addr(addr), .hit(hit_b), .sel(sel_b));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ref_map(input addr_t a, input longint base, input int num, input int bits,
                         input logic [15:0] present, output logic hit, output int slot);
    longint off;
    off  = longint'(a) - base;
    hit  = 1'b0;
    slot = -1;
    if (off >= 0 && off < longint'(num) * (longint'(1) << bits)) begin
      slot = int'(off >> bits);
      hit  = present[slot];
    end
  endtask

  task automatic try(input addr_t a);
    logic eh; int es;
    addr = a;
    #1;
    ref_map(a, 64'h4000_0000, 16, 12, 16'hFFFF, eh, es);
    checks++;
    if (hit_a !== eh || (eh && int'(sel_a) != es)) begin
      failures++;
      $display("FAIL default map %h: hit %b sel %0d, expected hit %b slot %0d", a, hit_a, sel_a, eh, es);
    end
    ref_map(a, longint'(B_BASE), B_NUM, B_BITS, B_PRESENT, eh, es);
    checks++;
    if (hit_b !== eh || (eh && int'(sel_b) != es)) begin
      failures++;
      $display("FAIL small map %h: hit %b sel %0d, expected hit %b slot %0d", a, hit_b, sel_b, eh, es);
    end
  endtask

  initial begin
    for (int s = 0; s <= 16; s++) begin
      try(32'h4000_0000 + s * 32'h1000);
      try(32'h4000_0FFF + s * 32'h1000);
      try(32'h1000_0000 + s * 32'h100);
      try(32'h1000_00FF + s * 32'h100);
    end
    try(32'h3FFF_FFFF);
    try(32'h0FFF_FFFF);
    try(32'h0000_0000);
    try(32'hFFFF_FFFF);
    for (int i = 0; i < 2000; i++) begin
      addr_t a;
      int    kind;
      kind = $urandom_range(0, 2);
      case (kind)
        0: a = 32'h4000_0000 + ($urandom & 32'h0001_FFFF);
        1: a = 32'h1000_0000 + ($urandom & 32'h0000_07FF);
        default: a = $urandom;
      endcase
      try(a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
