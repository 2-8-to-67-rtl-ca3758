// tb_sys_bus_if: decodes each region of the address map and checks the
// strobes, fields and data lanes; out-of-map writes must hit nothing.
module tb_sys_bus_if;
  import enc_pkg::*;
  int checks = 0, failures = 0;
  logic bus_we;
  logic [15:0] bus_addr;
  logic [127:0] bus_wdata, bus_rdata;
  logic rf_we, mb_we, sw_we, sw_ref;
  logic [7:0] rf_addr;
  logic [31:0] rf_wdata, rf_rdata;
  logic [3:0] mb_row;
  logic [6:0] sw_x;
  logic [5:0] sw_y;
  pix_t wdata_pix [16];
  sys_bus_if dut (.*);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit c);
    checks++;
    if (!c) failures++;
  endtask
  initial begin
    rf_rdata = 32'hCAFE_0123;
    for (int t = 0; t < 300; t++) begin
      int kind, r, y, g, row;
      kind = t % 4;
      bus_we = 1'($urandom_range(0, 4) != 0);
      bus_wdata = {$urandom, $urandom, $urandom, $urandom};
      r = $urandom_range(0, 1); y = $urandom_range(0, 47); g = $urandom_range(0, 4);
      row = $urandom_range(0, 15);
      case (kind)
        0: bus_addr = 16'($urandom_range(0, 255));
        1: bus_addr = 16'h1000 | 16'(row);
        2: bus_addr = 16'h4000 | 16'(r << 10) | 16'(y << 3) | 16'(g);
        default: bus_addr = 16'h2000 | 16'($urandom_range(0, 255));
      endcase
      #1;
      chk(rf_we == (bus_we && kind == 0));
      chk(mb_we == (bus_we && kind == 1));
      chk(sw_we == (bus_we && kind == 2));
      chk(bus_rdata[31:0] == 32'hCAFE_0123);
      if (kind == 0) chk(rf_addr == bus_addr[7:0] && rf_wdata == bus_wdata[31:0]);
      if (kind == 1) chk(mb_row == 4'(row));
      if (kind == 2) chk(sw_ref == 1'(r) && int'(sw_y) == y && int'(sw_x) == 16 * g);
      for (int i = 0; i < 16; i++) chk(wdata_pix[i] == bus_wdata[8*i +: 8]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
