// addr_decoder: the bridge's internal address map.
//
// The APB space is one window of NUM_SLV * 2**SLV_ADDR_BITS bytes starting at
// BASE_ADDR. Peripheral slot k owns the 2**SLV_ADDR_BITS bytes at
// BASE_ADDR + k * 2**SLV_ADDR_BITS. An address hits slot k when it lies in the
// window, k < NUM_SLV and bit k of SLV_PRESENT is set; any other address is
// unmapped (hit = 0) and the bridge answers it with DECERR without touching
// the APB bus. Purely combinational.
//
// Up to 16 peripherals follow the design's specification; the window layout,
// the 4 KiB slot size and the default base address are this design's choices.
// The offset bits below SLV_ADDR_BITS are not used here: they go to the
// peripheral on PADDR.
module addr_decoder
  import axi2apb_pkg::*;
#(
  parameter int unsigned NUM_SLV       = 16,
  parameter int unsigned SLV_ADDR_BITS = 12,
  parameter addr_t       BASE_ADDR     = 32'h4000_0000,
  parameter logic [MAX_SLV-1:0] SLV_PRESENT = '1
) (
  input  addr_t addr,
  output logic  hit,   // address belongs to a present peripheral
  output idx_t  sel    // its slot number, valid when hit
);

  localparam int unsigned TOP_LSB = SLV_ADDR_BITS + IDX_W;

  logic in_window;

  always_comb begin
    in_window = (addr[ADDR_W-1:TOP_LSB] == BASE_ADDR[ADDR_W-1:TOP_LSB]);
    sel       = addr[TOP_LSB-1:SLV_ADDR_BITS];
    hit       = in_window && (32'(sel) < NUM_SLV) && SLV_PRESENT[sel];
  end

  initial begin
    assert (NUM_SLV >= 1 && NUM_SLV <= MAX_SLV)
      else $error("addr_decoder: NUM_SLV must be 1..%0d", MAX_SLV);
    assert (TOP_LSB < ADDR_W) else $error("addr_decoder: window does not fit the address");
    assert (BASE_ADDR[TOP_LSB-1:0] == '0)
      else $error("addr_decoder: BASE_ADDR must be aligned to the window size");
  end

endmodule
