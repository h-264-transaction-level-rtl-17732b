// tb_dram_addr_map: self-checking test of the DRAM placement function.
//
// The address of random samples (random frame, plane and position inside a
// 1920x1088 frame) is compared with a reference worked out here from tile
// numbers. Two placement properties are also checked over whole regions:
// every sample of a 128x128 luma window and of a 64x64 chroma window gets
// its own address (no two samples collide), and every aligned 4x4 block lies
// in one DRAM row of one bank per memory, so fetching it never crosses a
// page. Purely combinational: the inputs are applied and the outputs read
// one time step later. A watchdog ends the run if it hangs.
module tb_dram_addr_map;
  import pred_pkg::*;

  localparam int FW = 1920, FH = 1088, TW = 64, TH = 64;

  logic [11:0] x, y;
  logic [4:0]  frame;
  comp_t       comp;
  logic [1:0]  mem, bank, lane;
  logic [13:0] row;
  logic [8:0]  col;

  int checks = 0, failures = 0;

  dram_addr_map dut (.x(x), .y(y), .frame(frame), .comp(comp),
                     .mem(mem), .bank(bank), .row(row), .col(col), .lane(lane));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int xi, input int yi, input int fi, input comp_t ci);
    x = 12'(xi); y = 12'(yi); frame = 5'(fi); comp = ci;
    #1;
  endtask

  // Reference: tiles_x per plane, 2x2 bank pattern, frame bases.
  function automatic void ref_addr(input int xi, input int yi, input int fi, input comp_t ci,
                                   output int m, output int b, output int r,
                                   output int c, output int l);
    int w, h, tilesx, tilesy, lrows, crows, base;
    lrows = ((FW / TW + 1) / 2) * ((FH / TH + 1) / 2);                    // 15 * 9
    crows = (((FW / 2 + TW - 1) / TW + 1) / 2) * (((FH / 2 + TH - 1) / TH + 1) / 2); // 8 * 5
    tilesx = (ci == COMP_Y) ? (FW + TW - 1) / TW : (FW / 2 + TW - 1) / TW;
    if (ci == COMP_Y) base = fi * lrows;
    else if (ci == COMP_CB) base = fi * 2 * crows;
    else base = fi * 2 * crows + crows;
    m = (ci == COMP_Y ? 0 : 2) + ((xi / 2) % 2);
    b = 2 * ((yi / TH) % 2) + ((xi / TW) % 2);
    r = base + ((yi / TH) / 2) * ((tilesx + 1) / 2) + (xi / TW) / 2;
    c = ((yi % TH) / 2) * (TW / 4) + (xi % TW) / 4;
    l = 2 * (yi % 2) + (xi % 2);
  endfunction

  bit seen [bit [31:0]];

  initial begin
    int m, b, r, c, l, fi, xi, yi, pw, ph;
    comp_t ci;
    // random samples against the reference
    for (int n = 0; n < 3000; n++) begin
      ci = comp_t'($urandom_range(0, 2));
      pw = (ci == COMP_Y) ? FW : FW / 2;
      ph = (ci == COMP_Y) ? FH : FH / 2;
      xi = $urandom_range(0, pw - 1);
      yi = $urandom_range(0, ph - 1);
      fi = $urandom_range(0, 16);
      apply(xi, yi, fi, ci);
      ref_addr(xi, yi, fi, ci, m, b, r, c, l);
      checks++;
      if (int'(mem) != m || int'(bank) != b || int'(row) != r || int'(col) != c || int'(lane) != l) begin
        failures++;
        if (failures < 10)
          $display("addr mismatch comp=%0d f=%0d x=%0d y=%0d got m%0d b%0d r%0d c%0d l%0d exp m%0d b%0d r%0d c%0d l%0d",
                   ci, fi, xi, yi, mem, bank, row, col, lane, m, b, r, c, l);
      end
    end
    // distinct addresses over a luma window straddling four tiles, and
    // chroma windows of both planes of two frames
    for (int p = 0; p < 5; p++) begin
      int x0, y0, sz;
      case (p)
        0: begin ci = COMP_Y;  fi = 0; x0 = 32; y0 = 32; sz = 128; end
        1: begin ci = COMP_CB; fi = 0; x0 = 40; y0 = 8;  sz = 64;  end
        2: begin ci = COMP_CR; fi = 0; x0 = 40; y0 = 8;  sz = 64;  end
        3: begin ci = COMP_CB; fi = 1; x0 = 40; y0 = 8;  sz = 64;  end
        default: begin ci = COMP_Y; fi = 1; x0 = 32; y0 = 32; sz = 64; end
      endcase
      for (int yy = y0; yy < y0 + sz; yy++)
        for (int xx = x0; xx < x0 + sz; xx++) begin
          bit [31:0] key;
          apply(xx, yy, fi, ci);
          key = {8'd0, mem, bank, row, col, lane};
          checks++;
          if (seen.exists(key)) begin
            failures++;
            if (failures < 10) $display("collision comp=%0d f=%0d x=%0d y=%0d", ci, fi, xx, yy);
          end
          seen[key] = 1;
        end
    end
    // an aligned 4x4 block stays in one row of one bank per memory
    for (int n = 0; n < 500; n++) begin
      int r0, b0;
      ci = comp_t'($urandom_range(0, 2));
      pw = (ci == COMP_Y) ? FW : FW / 2;
      ph = (ci == COMP_Y) ? FH : FH / 2;
      xi = 4 * $urandom_range(0, pw / 4 - 1);
      yi = 4 * $urandom_range(0, ph / 4 - 1);
      fi = $urandom_range(0, 16);
      apply(xi, yi, fi, ci);
      r0 = row; b0 = bank;
      for (int k = 1; k < 16; k++) begin
        apply(xi + k % 4, yi + k / 4, fi, ci);
        checks++;
        if (int'(row) != r0 || int'(bank) != b0) begin
          failures++;
          if (failures < 10) $display("4x4 block at %0d,%0d crosses a page", xi, yi);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
