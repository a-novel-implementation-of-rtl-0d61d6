// addr_converter_tb: self-checking test of the symbolic to physical address
// converter.
//
// Three converters are driven with every index pair of their arrays:
//   90 x 90 (defaults, H mod n = 2, so two row-major rows at the bottom),
//   80 x 80 (H mod n = 0, tiled everywhere),
//   75 x 75 (H mod n = 3),
// all with 8 x 4 tiles and a 256 x 32 word memory. The expected address is
// computed from the unsimplified four-term f_rc equation with divisions and
// remainders for y < H', and as W*y + x for the leftover rows. The test
// also checks the region output, that every address is below W*H, and that
// no two index pairs share an address (the mapping is a bijection onto
// 0..W*H-1). A few hand-worked addresses are checked as well.
module addr_converter_tb
  import tile_map_pkg::*;
;

  int checks = 0;
  int failures = 0;
  int n_r1 = 0;
  int n_r2 = 0;

  logic [6:0]  x90, y90, x80, y80, x75, y75;
  logic [12:0] a90, a80, a75;
  region_e     g90, g80, g75;

  addr_converter dut90 (.x(x90), .y(y90), .addr(a90), .region(g90));
  addr_converter #(.W(80), .H(80)) dut80 (.x(x80), .y(y80), .addr(a80), .region(g80));
  addr_converter #(.W(75), .H(75)) dut75 (.x(x75), .y(y75), .addr(a75), .region(g75));

  function automatic int ref_addr(int w, int h, int m, int n, int x, int y);
    int hp;
    hp = h - (h % n);
    if (y < hp)
      return (y - y % n) * w + (x - x % m) * n + (x % m) * n + y % n;
    else
      return w * y + x;
  endfunction

  bit seen [8192];

  task automatic sweep(input int w, input int h);
    int hp;
    hp = h - (h % 4);
    foreach (seen[i]) seen[i] = 1'b0;
    for (int y = 0; y < h; y++) begin
      for (int x = 0; x < w; x++) begin
        int          expected;
        int          got;
        region_e     greg;
        region_e     ereg;
        case (w)
          90: begin x90 = 7'(x); y90 = 7'(y); end
          80: begin x80 = 7'(x); y80 = 7'(y); end
          default: begin x75 = 7'(x); y75 = 7'(y); end
        endcase
        #1;
        case (w)
          90: begin got = int'(a90); greg = g90; end
          80: begin got = int'(a80); greg = g80; end
          default: begin got = int'(a75); greg = g75; end
        endcase
        expected = ref_addr(w, h, 8, 4, x, y);
        ereg = (y >= hp) ? REGION_ROW_MAJOR : REGION_TILED;
        if (greg == REGION_ROW_MAJOR) n_r2++; else n_r1++;
        checks++;
        if (got != expected || greg != ereg) begin
          failures++;
          if (failures < 10)
            $display("FAIL %0dx%0d (x=%0d,y=%0d): addr %0d expected %0d region %0d expected %0d",
                     w, h, x, y, got, expected, greg, ereg);
        end
        checks++;
        if (got >= w * h || seen[got]) begin
          failures++;
          if (failures < 10) $display("FAIL %0dx%0d address %0d out of range or repeated", w, h, got);
        end else begin
          seen[got] = 1'b1;
        end
      end
    end
  endtask

  task automatic spot(input int x, input int y, input int expected);
    x90 = 7'(x); y90 = 7'(y);
    #1;
    checks++;
    if (int'(a90) != expected) begin
      failures++;
      $display("FAIL 90x90 spot (x=%0d,y=%0d): %0d expected %0d", x, y, a90, expected);
    end
  endtask

  initial begin
    sweep(90, 90);
    sweep(80, 80);
    sweep(75, 75);
    // Hand-worked points of the 90 x 90 mapping:
    // (1,0): next column of the first tile -> 4;  (0,1): next row -> 1;
    // (0,4): first word of the second tile row -> 90*4 = 360;
    // (89,87): last tiled word -> 90*84 + 89*4 + 3 = 7919 = 90*88 - 1;
    // (0,88): first row-major word -> 7920;  (89,89): last -> 8099.
    spot(1, 0, 4);
    spot(0, 1, 1);
    spot(0, 4, 360);
    spot(89, 87, 7919);
    spot(0, 88, 7920);
    spot(89, 89, 8099);
    checks++;
    if (n_r1 == 0 || n_r2 == 0) begin
      failures++;
      $display("FAIL region coverage r1=%0d r2=%0d", n_r1, n_r2);
    end
    $display("tiled=%0d row-major=%0d", n_r1, n_r2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
