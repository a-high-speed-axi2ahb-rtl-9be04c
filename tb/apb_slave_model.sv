// apb_slave_model: behavioural APB4 peripheral used by the testbenches.
//
// A 16-word register file answering at any address of its slot (word index
// PADDR[5:2]). After reset word w reads as 0xA000_0000 | SLOT << 16 | w.
// Writes honour PSTRB. Any address whose bits [11:8] are all ones is an error
// location: the transfer completes with PSLVERR high and writes nothing.
// Each transfer gets wait states: wait_cfg of them when wait_rand is low,
// otherwise a random number from 0 to wait_cfg, chosen in the SETUP cycle.
// PREADY is low while wait states remain. waits counts the ENABLE cycles
// spent with PREADY low, xfers the completed transfers.
module apb_slave_model
  import axi2apb_pkg::*;
#(
  parameter int unsigned SLOT = 0
) (
  input  logic        pclk,
  input  logic        presetn,
  input  logic        psel,
  input  logic        penable,
  input  logic        pwrite,
  input  addr_t       paddr,
  input  data_t       pwdata,
  input  strb_t       pstrb,
  output data_t       prdata,
  output logic        pready,
  output logic        pslverr,
  input  int unsigned wait_cfg,
  input  logic        wait_rand,
  output int unsigned waits,
  output int unsigned xfers
);

  data_t       mem [16];
  int unsigned wait_left;
  logic        err_loc;

  assign err_loc = (paddr[11:8] == 4'hF);
  assign pready  = (wait_left == 0);
  assign prdata  = (psel && !pwrite) ? mem[paddr[5:2]] : '0;
  assign pslverr = psel && penable && pready && err_loc;

  always_ff @(posedge pclk or negedge presetn) begin
    if (!presetn) begin
      for (int w = 0; w < 16; w++) mem[w] <= 32'hA000_0000 | (SLOT << 16) | w;
      wait_left <= 0;
      waits     <= 0;
      xfers     <= 0;
    end else begin
      if (psel && !penable) begin
        wait_left <= wait_rand ? $urandom_range(0, wait_cfg) : wait_cfg;
      end else if (psel && penable) begin
        if (!pready) begin
          wait_left <= wait_left - 1;
          waits     <= waits + 1;
        end else begin
          xfers <= xfers + 1;
          if (pwrite && !err_loc)
            for (int b = 0; b < STRB_W; b++)
              if (pstrb[b]) mem[paddr[5:2]][8*b +: 8] <= pwdata[8*b +: 8];
        end
      end
    end
  end

endmodule
