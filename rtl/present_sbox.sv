// 4-bit PRESENT substitution box, held as a 16-entry lookup table.
//
// The design builds both the round function's substitution layer and the key
// module's key-replacement step from this one lookup table. The table contents
// are the published PRESENT S-box:
//   x    : 0 1 2 3 4 5 6 7 8 9 A B C D E F
//   S[x] : C 5 6 B 9 0 A D 3 E F 8 4 7 1 2
// With `inverse` high the block returns S^-1[x] instead, for decryption.
// Purely combinational; one LUT4-sized function per output bit on an FPGA.
module present_sbox (
  input  logic       inverse,  // 0: S, 1: S^-1
  input  logic [3:0] x,
  output logic [3:0] y
);

  always_comb begin
    if (!inverse) begin
      unique case (x)
        4'h0: y = 4'hC;  4'h1: y = 4'h5;  4'h2: y = 4'h6;  4'h3: y = 4'hB;
        4'h4: y = 4'h9;  4'h5: y = 4'h0;  4'h6: y = 4'hA;  4'h7: y = 4'hD;
        4'h8: y = 4'h3;  4'h9: y = 4'hE;  4'hA: y = 4'hF;  4'hB: y = 4'h8;
        4'hC: y = 4'h4;  4'hD: y = 4'h7;  4'hE: y = 4'h1;  default: y = 4'h2;
      endcase
    end else begin
      unique case (x)
        4'h0: y = 4'h5;  4'h1: y = 4'hE;  4'h2: y = 4'hF;  4'h3: y = 4'h8;
        4'h4: y = 4'hC;  4'h5: y = 4'h1;  4'h6: y = 4'h2;  4'h7: y = 4'hD;
        4'h8: y = 4'hB;  4'h9: y = 4'h4;  4'hA: y = 4'h6;  4'hB: y = 4'h3;
        4'hC: y = 4'h0;  4'hD: y = 4'h7;  4'hE: y = 4'h9;  default: y = 4'hA;
      endcase
    end
  end

endmodule
