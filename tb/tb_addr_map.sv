// Testbench of addr_map: compares the mapping with a reference written from the
// rules (module = y mod 2, bank = (y/2 + x/32) mod 32, page = {x/32, y/64},
// column = x mod 32) for random and corner coordinates, and checks that no two
// coordinates of a 128 x 128 window share a module/bank/page/column location.
module tb_addr_map;
  import mompda_pkg::*;

  xcoord_t x;
  ycoord_t y;
  logic module_sel;
  logic [BANKW-1:0] bank;
  logic [PAGEW-1:0] page;
  logic [COLW-1:0]  col;
  int checks = 0, failures = 0;
  bit seen [int];

  addr_map dut (.*);

  task automatic check_one(input int xi, input int yi);
    int e_mod, e_bank, e_page, e_col;
    x = XW'(xi);
    y = YW'(yi);
    #1;
    e_mod  = yi % 2;
    e_bank = ((yi / 2) + (xi / 32)) % 32;
    e_page = (xi / 32) * 16 + (yi / 64);
    e_col  = xi % 32;
    checks++;
    if (int'(module_sel) != e_mod || int'(bank) != e_bank || int'(page) != e_page || int'(col) != e_col) begin
      failures++;
      $display("FAIL x=%0d y=%0d got m%0d b%0d p%0d c%0d exp m%0d b%0d p%0d c%0d",
               xi, yi, module_sel, bank, page, col, e_mod, e_bank, e_page, e_col);
    end
  endtask

  initial begin
    check_one(0, 0);
    check_one(1023, 1023);
    check_one(31, 2);
    check_one(32, 2);
    check_one(0, 1);
    for (int i = 0; i < 2000; i++) check_one(int'($urandom_range(1023)), int'($urandom_range(1023)));
    // one-to-one over a window
    for (int xi = 0; xi < 128; xi++)
      for (int yi = 0; yi < 128; yi++) begin
        int key;
        x = XW'(xi); y = YW'(yi);
        #1;
        key = {module_sel, bank, page, col};
        checks++;
        if (seen.exists(key)) begin
          failures++;
          $display("FAIL collision at x=%0d y=%0d", xi, yi);
        end
        seen[key] = 1'b1;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
