// lns_rom: correction tables for LNS addition and subtraction.
//
// Adding or subtracting two LNS magnitudes 2^emax and 2^emin gives
//   e = emax + log2(1 + 2^-D)   (same signs)   or
//   e = emax + log2(1 - 2^-D)   (opposite signs),   D = emax - emin >= 0.
// This block returns the correction term for a given D. D is an unsigned
// fixed-point number with 12 fractional bits.
//
// Address calculation (follows the ten-segment ROM split of the design):
// the resolution of D is halved for each segment further from zero, where
// both functions flatten out.
//   D range   address range  step of D
//   0.0-0.5     0-2047        2^-12
//   0.5-1.0  2048-3071        2^-11
//   1.0-2.0  3072-5119        2^-11
//   2.0-3.0  5120-6143        2^-10
//   3.0-4.0  6144-6655        2^-9
//   4.0-5.0  6656-6911        2^-8
//   5.0-6.0  6912-7039        2^-7
//   6.0-7.0  7040-7103        2^-6
//   7.0-8.0  7104-7135        2^-5
//   8.0-9.0  7136-7151        2^-4
// For D >= 9 the correction is taken as zero. Each entry holds the function
// value at the lower end of its step, rounded to 12 fractional bits. The
// entries are computed at elaboration from the formula; the design stored
// them in reduced-width ROMs, here each entry holds the full correction value
// (an implementation choice). Entry 0 of the subtraction table (D = 0, exact
// cancellation) is never used: the ALU returns zero for that case.
//
// Interface: purely combinational, d in, sub selects the table, corr out
// (signed, 12 fractional bits).
module lns_rom
  import lns_pkg::*;
#(
  parameter int unsigned ROM_DEPTH = 7152
) (
  input  logic [EXP_W:0]       d,     // D = emax - emin, unsigned, 12 fractional bits
  input  logic                 sub,   // 1: log2(1 - 2^-D), 0: log2(1 + 2^-D)
  output logic signed [19:0]   corr   // correction, 12 fractional bits
);

  localparam int unsigned AW = $clog2(ROM_DEPTH);

  logic signed [19:0] add_rom [ROM_DEPTH];
  logic signed [19:0] sub_rom [ROM_DEPTH];

  // Lower end of the D range covered by table entry a, in units of 2^-12.
  function automatic int unsigned entry_d(input int unsigned a);
    if      (a < 2048) return a;
    else if (a < 3072) return 2048  + ((a - 2048) << 1);
    else if (a < 5120) return 4096  + ((a - 3072) << 1);
    else if (a < 6144) return 8192  + ((a - 5120) << 2);
    else if (a < 6656) return 12288 + ((a - 6144) << 3);
    else if (a < 6912) return 16384 + ((a - 6656) << 4);
    else if (a < 7040) return 20480 + ((a - 6912) << 5);
    else if (a < 7104) return 24576 + ((a - 7040) << 6);
    else if (a < 7136) return 28672 + ((a - 7104) << 7);
    else               return 32768 + ((a - 7136) << 8);
  endfunction

  function automatic logic signed [19:0] round_fix(input real v);
    real s;
    s = v * 4096.0;
    if (s < -262144.0) s = -262144.0;
    return 20'($rtoi(s < 0.0 ? s - 0.5 : s + 0.5));
  endfunction

  initial begin
    for (int unsigned a = 0; a < ROM_DEPTH; a++) begin
      real dv;
      dv = real'(entry_d(a)) / 4096.0;
      add_rom[a] = round_fix($ln(1.0 + $pow(2.0, -dv)) / $ln(2.0));
      if (a == 0) sub_rom[a] = round_fix(-64.0);
      else        sub_rom[a] = round_fix($ln(1.0 - $pow(2.0, -dv)) / $ln(2.0));
    end
  end

  logic [AW-1:0] addr;
  logic          beyond;

  // Segment decode on the integer part and the upper fractional bits of D.
  int unsigned dd;

  always_comb begin
    dd     = 32'(d);
    beyond = 1'b0;
    addr   = '0;
    if (dd < 2048)       addr = AW'(d);
    else if (dd < 4096)  addr = AW'(2048 + ((dd - 2048)  >> 1));
    else if (dd < 8192)  addr = AW'(3072 + ((dd - 4096)  >> 1));
    else if (dd < 12288) addr = AW'(5120 + ((dd - 8192)  >> 2));
    else if (dd < 16384) addr = AW'(6144 + ((dd - 12288) >> 3));
    else if (dd < 20480) addr = AW'(6656 + ((dd - 16384) >> 4));
    else if (dd < 24576) addr = AW'(6912 + ((dd - 20480) >> 5));
    else if (dd < 28672) addr = AW'(7040 + ((dd - 24576) >> 6));
    else if (dd < 32768) addr = AW'(7104 + ((dd - 28672) >> 7));
    else if (dd < 36864) addr = AW'(7136 + ((dd - 32768) >> 8));
    else                    beyond = 1'b1;
  end

  assign corr = beyond ? '0 : (sub ? sub_rom[addr] : add_rom[addr]);

endmodule
