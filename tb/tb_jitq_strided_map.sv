// tb_jitq_strided_map: the strided placement against an independent
// arithmetic model, over random tiles, regions and elements. Also checks
// that every element of one tile lands in a distinct word of one unit and
// one lane, and that a tile row stays within one DRAM row.
module tb_jitq_strided_map;
  import jitq_pkg::*;

  localparam int unsigned UNITS = 8;

  logic [15:0]     tile;
  region_e         region;
  logic [7:0]      elem;
  logic [UNIT_AW-1:0] unit;
  logic [3:0]      lane;
  logic [ROW_AW-1:0] group;
  bank_addr_t      addr;

  int checks = 0, failures = 0;

  jitq_strided_map #(.UNITS(UNITS), .TILE_W(16)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seen [int];
    for (int it = 0; it < 3000; it++) begin
      int t, rg, e, x_lane, x_unit, x_grp, x_odd, x_row, x_col;
      t  = int'($urandom % 4096);
      rg = int'($urandom % 4);
      e  = int'($urandom % 256);
      tile = 16'(t); region = region_e'(rg); elem = 8'(e);
      #1;
      x_lane = t % 16;
      x_unit = (t / 16) % UNITS;
      x_grp  = t / (16 * UNITS);
      if (rg == 3) begin
        x_odd = 0; x_row = x_grp * 16 + 12; x_col = e % 32;
      end else begin
        x_odd = e / 128; x_row = x_grp * 16 + rg * 4 + (e % 128) / 32; x_col = e % 32;
      end
      checks++;
      if (int'(lane) != x_lane || int'(unit) != x_unit || int'(group) != x_grp ||
          int'(addr.odd) != x_odd || int'(addr.row) != x_row || int'(addr.col) != x_col) begin
        failures++;
        $display("FAIL t=%0d rg=%0d e=%0d: u%0d l%0d odd%0d r%0d c%0d", t, rg, e,
                 unit, lane, addr.odd, addr.row, addr.col);
      end
    end
    // one tile: distinct words, same unit and lane
    for (int e = 0; e < 256; e++) begin
      int key;
      tile = 16'd1234; region = REG_IN; elem = 8'(e);
      #1;
      key = int'({addr.odd, addr.row, addr.col});
      checks++;
      if (seen.exists(key) || unit != UNIT_AW'((1234 / 16) % UNITS) || lane != 4'(1234 % 16)) begin
        failures++; $display("FAIL tile element %0d collides or moves", e);
      end
      seen[key] = 1;
    end
    // a tile row shares one DRAM row
    for (int r = 0; r < 16; r++) begin
      logic [ROW_AW-1:0] r0;
      logic o0;
      for (int c = 0; c < 16; c++) begin
        tile = 16'd77; region = REG_IN; elem = 8'(r * 16 + c);
        #1;
        if (c == 0) begin r0 = addr.row; o0 = addr.odd; end
        checks++;
        if (addr.row != r0 || addr.odd != o0) begin
          failures++; $display("FAIL tile row %0d spans rows", r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
