// tb_alu: self-checking test of the ALU.
//
// First replays the eight operations of the source document's ALU waveform
// (x = 8'hAA, y = 8'h55, cin = 0, en = 1) against the printed results, then
// compares 4000 random operations, with random cin and en, against
// results worked out here with plain integer arithmetic.
module tb_alu;
  logic [2:0] sel;
  logic [7:0] x, y, r;
  logic cin, en, cout;
  int checks = 0, failures = 0;

  alu dut (.sel, .x, .y, .cin, .en, .r, .cout);

  task automatic expect_out(input logic [7:0] er, input logic ec);
    checks++;
    if (r !== er || cout !== ec) begin
      failures++;
      $display("FAIL sel=%0d x=%h y=%h cin=%b en=%b: r=%h cout=%b, expected %h %b", sel, x, y, cin, en, r, cout, er, ec);
    end
  endtask

  initial begin
    int ix, iy, res;
    logic [7:0] printed [8] = '{8'hFF, 8'h56, 8'h55, 8'h54, 8'h00, 8'hFF, 8'hAA, 8'hFF};
    x = 8'hAA; y = 8'h55; cin = 1'b0; en = 1'b1;
    for (int s = 0; s < 8; s++) begin
      sel = 3'(s); #1;
      expect_out(printed[s], 1'b0);
    end
    for (int k = 0; k < 4000; k++) begin
      x = 8'($urandom); y = 8'($urandom); sel = 3'($urandom); cin = 1'($urandom); en = ($urandom % 8) != 0;
      #1;
      ix = int'(x); iy = int'(y);
      case (sel)
        3'd0: res = ix + iy + int'(cin);
        3'd1: res = iy + 1;
        3'd2: res = ix - iy - int'(cin);
        3'd3: res = iy - 1;
        3'd4: res = ix & iy;
        3'd5: res = ix | iy;
        3'd6: res = 255 - iy;
        default: res = ix ^ iy;
      endcase
      if (!en) expect_out(8'h00, 1'b0);
      else expect_out(8'(res), (sel < 3'd4) && (res < 0 || res > 255));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
