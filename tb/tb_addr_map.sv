// Testbench of the private-bank address decoder.
// Random and corner addresses and requestor indices; the expected bank, row,
// column and ownership are computed with integer division and remainder on
// the address value, independently of the decoder's bit slicing.
//
// Private banks follow the design; the address layout checked here is this
// implementation's choice.
module tb_addr_map;
  import mc_pkg::*;

  localparam int M = 8;

  addr_t addr;
  logic [2:0] rid;
  bank_t bank;
  row_t  row;
  col_t  col;
  logic  ok;

  addr_map #(.NUM_REQ(M)) dut (.addr, .rid, .bank, .row, .col, .private_ok(ok));

  int checks = 0, failures = 0;

  task automatic one(longint unsigned a, int r);
    longint unsigned eb, er, ec;
    addr = addr_t'(a);
    rid  = 3'(r);
    #1;
    eb = a / (64 * 128 * 32768);
    er = (a / (64 * 128)) % 32768;
    ec = ((a / 64) % 128) * 8;
    checks++;
    if (bank != bank_t'(eb) || row != row_t'(er) || col != col_t'(ec) || ok != (eb == longint'(r % NUM_BANKS))) begin
      failures++;
      if (failures < 10) $display("FAIL addr=%h rid=%0d: bank %0d/%0d row %0d/%0d col %0d/%0d ok %0d",
                                  a, r, bank, eb, row, er, col, ec, ok);
    end
  endtask

  initial begin
    one(0, 0);
    one(64'h7FFF_FFFF, 7);
    one(64'h1000_0000, 1);
    one(64'h1000_0000, 2);
    one(64'h0000_2040, 0);
    for (int i = 0; i < 2000; i++) begin
      longint unsigned a;
      int r;
      a = {$urandom, $urandom} & 64'h7FFF_FFFF;
      r = $urandom_range(0, M - 1);
      if ($urandom_range(0, 1) == 1) a = (a & 64'h0FFF_FFFF) | (longint'(r) << 28);
      one(a, r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
