// sys_bus_if: system bus interface of the encoder.
// A simple synchronous write/read bus from the host: 16-bit word address,
// 128-bit data (16 pixels). It decodes each write to one of three targets:
// the coding-parameter register file, a row of the current-MB input buffer,
// or 16 pixels of a row of a search window (address map in enc_pkg). Reads
// return the register file. Single-cycle, no wait states. The bus exists in
// the system block diagram; its protocol and map are this design's choice.
module sys_bus_if
  import enc_pkg::*;
(
  input  logic         bus_we,
  input  logic [15:0]  bus_addr,
  input  logic [127:0] bus_wdata,
  output logic [127:0] bus_rdata,
  // register file
  output logic         rf_we,
  output logic [7:0]   rf_addr,
  output logic [31:0]  rf_wdata,
  input  logic [31:0]  rf_rdata,
  // current-MB input buffer
  output logic         mb_we,
  output logic [3:0]   mb_row,
  // search window
  output logic         sw_we,
  output logic         sw_ref,
  output logic [6:0]   sw_x,
  output logic [5:0]   sw_y,
  output pix_t         wdata_pix [16]
);
  always_comb begin
    rf_we    = bus_we && (bus_addr[15:8] == 8'h00);
    rf_addr  = bus_addr[7:0];
    rf_wdata = bus_wdata[31:0];
    mb_we    = bus_we && (bus_addr[15:8] == 8'h10) && (bus_addr[7:4] == 4'h0);
    mb_row   = bus_addr[3:0];
    sw_we    = bus_we && (bus_addr[15:14] == 2'b01) && (bus_addr[2:0] < 3'd5)
               && (bus_addr[8:3] < 6'd48);
    sw_ref   = bus_addr[10];
    sw_y     = bus_addr[8:3];
    sw_x     = {bus_addr[2:0], 4'b0000};
    for (int i = 0; i < 16; i++) wdata_pix[i] = bus_wdata[8*i +: 8];
    bus_rdata = {96'd0, rf_rdata};
  end
endmodule
