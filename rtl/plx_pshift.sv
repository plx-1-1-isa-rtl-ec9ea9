// plx_pshift: PLX 1.1 parallel subword shifter (pshift and pshifti).
//
// Treats the 64-bit source as 4 subwords of 2 bytes, 2 of 4 bytes or 1 of 8
// bytes (subword size code ss = 01, 10, 11; bytes = 1 << ss) and shifts every
// subword by the same amount: left logical, right arithmetic or right logical.
// Bits never cross a subword boundary. The amount is the 5-bit immediate for
// pshifti (format 4b) or the low 6 bits of Rs2 for pshift (format 4a). An
// amount as large as the subword width or more clears the subword (left and
// right logical) or fills it with its sign bit (right arithmetic).
//
// The three shift kinds, the three subword sizes and their codes follow the
// PLX 1.1 encoding. Taking the register amount from the low 6 bits of Rs2, one
// amount for all subwords, and the handling of large amounts are this design's
// choices. ss = 00 (1-byte subwords) is not a legal shift; the unit then
// returns the source unchanged.
//
// Interface: kind, ss, source and amount in, result out. Timing: combinational.
module plx_pshift
  import plx_pkg::*;
(
  input  psh_e        kind,
  input  logic [1:0]  ss,
  input  word_t       src,
  input  logic [5:0]  amount,
  output word_t       result
);

  // One shifter per subword size; the size code picks the result.
  word_t r2, r4, r8;

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      logic [15:0] s;
      s = src[16*i +: 16];
      unique case (kind)
        PSH_L:   r2[16*i +: 16] = (amount >= 6'd16) ? '0 : s << amount;
        PSH_RA:  r2[16*i +: 16] = 16'($signed(s) >>> ((amount >= 6'd16) ? 6'd15 : amount));
        default: r2[16*i +: 16] = (amount >= 6'd16) ? '0 : s >> amount;
      endcase
    end
    for (int i = 0; i < 2; i++) begin
      logic [31:0] s;
      s = src[32*i +: 32];
      unique case (kind)
        PSH_L:   r4[32*i +: 32] = (amount >= 6'd32) ? '0 : s << amount;
        PSH_RA:  r4[32*i +: 32] = 32'($signed(s) >>> ((amount >= 6'd32) ? 6'd31 : amount));
        default: r4[32*i +: 32] = (amount >= 6'd32) ? '0 : s >> amount;
      endcase
    end
    unique case (kind)
      PSH_L:   r8 = src << amount;
      PSH_RA:  r8 = word_t'($signed(src) >>> amount);
      default: r8 = src >> amount;
    endcase
  end

  always_comb begin
    unique case (ss)
      SS_2:    result = r2;
      SS_4:    result = r4;
      SS_8:    result = r8;
      default: result = src;
    endcase
  end

endmodule
