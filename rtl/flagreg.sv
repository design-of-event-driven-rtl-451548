// flagreg: flag register of the processor, read by the control unit as fin.
//
// Bits: 0 C (ALU carry/borrow), 1 Z (ALU result zero), 2 EQ, 3 GT, 4 LT
// (last CMP), 5 IE (interrupts enabled), 6 IP (interrupt pending), 7 = 0.
// C and Z load on the rising clock edge when alu_we is high; EQ, GT and LT
// load when cmp_we is high; IE and IP are passed through from the
// interrupt block, which holds them. Synchronous reset clears everything.
// The source document names a flag register and an 8-bit flag input of the
// control unit; the flag set and bit order are this design's choice.
module flagreg
  import cpu_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        alu_we,
  input  logic        cout,
  input  logic [7:0]  res,
  input  logic        cmp_we,
  input  logic        eq,
  input  logic        gt,
  input  logic        lt,
  input  logic        ie,
  input  logic        ip,
  output logic [7:0]  flags
);

  logic c_q, z_q, eq_q, gt_q, lt_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      {c_q, z_q, eq_q, gt_q, lt_q} <= '0;
    end else begin
      if (alu_we) begin
        c_q <= cout;
        z_q <= (res == '0);
      end
      if (cmp_we) begin
        eq_q <= eq;
        gt_q <= gt;
        lt_q <= lt;
      end
    end
  end

  always_comb begin
    flags       = '0;
    flags[F_C]  = c_q;
    flags[F_Z]  = z_q;
    flags[F_EQ] = eq_q;
    flags[F_GT] = gt_q;
    flags[F_LT] = lt_q;
    flags[F_IE] = ie;
    flags[F_IP] = ip;
  end

endmodule
