// tb_lsu_agu: self-checking testbench of the address generation unit.
// Applies directed and random operand sets and compares the linear address
// with seg + base + index * 2^scale + disp computed here with a multiply
// (the unit shifts), all modulo 2^32.
module tb_lsu_agu;
  import lsu_pkg::*;

  addr_t      seg, disp, lin;
  data_t      base, index;
  logic [1:0] scale;
  int checks = 0, failures = 0;

  lsu_agu dut (.seg, .base, .index, .scale, .disp, .lin_addr(lin));

  task automatic apply(addr_t s, data_t b, data_t i, logic [1:0] sc, addr_t d);
    longint unsigned expect_l;
    seg = s; base = b; index = i; scale = sc; disp = d;
    #1;
    expect_l = (longint'(s) + longint'(b) + longint'(i) * (longint'(1) << sc) + longint'(d)) % (longint'(1) << 32);
    checks++;
    if (lin !== addr_t'(expect_l)) begin
      failures++;
      $display("FAIL: seg=%h base=%h index=%h scale=%0d disp=%h -> %h expected %h", s, b, i, sc, d, lin, addr_t'(expect_l));
    end
  endtask

  initial begin
    apply(32'h0, 32'h0, 32'h0, 2'd0, 32'h0);
    apply(32'h1000, 32'h10, 32'h3, 2'd2, 32'h4);       // 0x1000+0x10+12+4
    apply(32'hFFFF_FFFF, 32'h1, 32'h0, 2'd0, 32'h0);   // wraps to 0
    apply(32'h0, 32'h100, 32'h1, 2'd3, 32'hFFFF_FFF8); // disp -8
    for (int n = 0; n < 2000; n++)
      apply($urandom, $urandom, $urandom, 2'($urandom), $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
