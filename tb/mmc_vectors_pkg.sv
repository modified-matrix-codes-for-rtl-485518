// mmc_vectors_pkg - the worked 8-bit decoding cases of the three methods,
// used by the corrector and decoder testbenches. The stored word is all zeros,
// so the published H, R and V columns are also the syndromes dH, dR and dV.
// Entry 9 (read data 00000101) is the last case of the published simulation waveforms.
// Method 2, read data 00011111: the published waveform shows 11110000, which is what
// the per-row rule gives; that value is used here.
package mmc_vectors_pkg;

  typedef struct packed {
    logic [7:0] dread;
    logic [1:0] dh;
    logic [5:0] dr;
    logic [3:0] dv;
    logic [7:0] dout_m1;
    logic [7:0] dout_m2;
    logic [7:0] dout_m3;
  } case_t;

  localparam int NCASES = 10;

  localparam case_t CASES [NCASES] = '{
    '{8'b00000000, 2'b00, 6'b000000, 4'b0000, 8'b00000000, 8'b00000000, 8'b00000000},
    '{8'b00000001, 2'b01, 6'b000011, 4'b0001, 8'b00000000, 8'b00000000, 8'b00000000},
    '{8'b00000011, 2'b00, 6'b000110, 4'b0011, 8'b00110000, 8'b00000000, 8'b00000000},
    '{8'b00000111, 2'b01, 6'b000000, 4'b0111, 8'b00000000, 8'b00000000, 8'b00000000},
    '{8'b00001111, 2'b00, 6'b000111, 4'b1111, 8'b11110000, 8'b00001111, 8'b00000000},
    '{8'b00011111, 2'b10, 6'b011111, 4'b1110, 8'b11111111, 8'b11110000, 8'b11110001},
    '{8'b00111111, 2'b00, 6'b110111, 4'b1100, 8'b11110011, 8'b00001111, 8'b11110011},
    '{8'b01111111, 2'b10, 6'b000111, 4'b1000, 8'b11111111, 8'b11110000, 8'b11110111},
    '{8'b11111111, 2'b00, 6'b111111, 4'b0000, 8'b11111111, 8'b11111111, 8'b11111111},
    '{8'b00000101, 2'b00, 6'b000101, 4'b0101, 8'b01010000, 8'b00000000, 8'b00000000}
  };

endpackage
