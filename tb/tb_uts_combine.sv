// tb_uts_combine: self-check of the partial-product combiner at H = 8 (the
// 16-bit level), H = 4 and H = 2. Operands are split into halves, the four
// half-width products are computed by the testbench with the * operator and
// fed in, and the result must equal the full-width product. The cases in
// which the crosswise sum and the middle stage carry out are counted; both
// must occur.
module tb_uts_combine;
  logic [15:0] ll8, lh8, hl8, hh8;
  logic [31:0] p8;
  logic [7:0]  ll4, lh4, hl4, hh4;
  logic [15:0] p4;
  logic [3:0]  ll2, lh2, hl2, hh2;
  logic [7:0]  p2;
  int checks = 0, failures = 0;
  int cross_carries = 0, mid_carries = 0;

  uts_combine dut8 (.p_ll(ll8), .p_lh(lh8), .p_hl(hl8), .p_hh(hh8), .p(p8));
  uts_combine #(.H(4)) dut4 (.p_ll(ll4), .p_lh(lh4), .p_hl(hl4), .p_hh(hh4), .p(p4));
  uts_combine #(.H(2)) dut2 (.p_ll(ll2), .p_lh(lh2), .p_hl(hl2), .p_hh(hh2), .p(p2));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check8(input logic [15:0] a, input logic [15:0] b);
    logic [31:0] exp;
    ll8 = a[7:0] * b[7:0];
    lh8 = a[7:0] * b[15:8];
    hl8 = a[15:8] * b[7:0];
    hh8 = a[15:8] * b[15:8];
    #1;
    exp = {16'b0, a} * {16'b0, b};
    checks++;
    if ((17'(lh8) + 17'(hl8)) >> 16 != 0) cross_carries++;
    if (((17'(lh8) + 17'(hl8)) & 17'hffff) + 17'(ll8[15:8]) > 17'hffff) mid_carries++;
    if (p8 != exp) begin
      failures++;
      if (failures < 10) $display("FAIL8 %h*%h got %h exp %h", a, b, p8, exp);
    end
  endtask

  initial begin
    check8(16'hffff, 16'hffff);
    check8(16'h0000, 16'hffff);
    check8(16'h00ff, 16'hff00);
    check8(16'h80ff, 16'hff80);
    for (int i = 0; i < 50000; i++) check8(16'($urandom), 16'($urandom));
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        ll4 = 8'(i[3:0] * j[3:0]);
        lh4 = 8'(i[3:0] * j[7:4]);
        hl4 = 8'(i[7:4] * j[3:0]);
        hh4 = 8'(i[7:4] * j[7:4]);
        #1;
        checks++;
        if (p4 != 16'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL4 %0d*%0d got %0d", i, j, p4);
        end
      end
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        ll2 = 4'(i[1:0] * j[1:0]);
        lh2 = 4'(i[1:0] * j[3:2]);
        hl2 = 4'(i[3:2] * j[1:0]);
        hh2 = 4'(i[3:2] * j[3:2]);
        #1;
        checks++;
        if (p2 != 8'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL2 %0d*%0d got %0d", i, j, p2);
        end
      end
    $display("crosswise carries: %0d, middle-stage carries: %0d", cross_carries, mid_carries);
    if (cross_carries == 0) begin failures++; $display("FAIL crosswise carry never seen"); end
    if (mid_carries == 0) begin failures++; $display("FAIL middle-stage carry never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
