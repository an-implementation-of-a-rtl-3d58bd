// h8_prog_pkg: the test program run by the system testbenches, as H8/300
// machine code (16-bit words, address = 2 * index), plus the values the
// testbenches compare against.
//
// The program builds the string "Hello Columbia" byte by byte in memory at
// H'0140 using arithmetic, logic, shift and bit instructions and byte
// stores to even and odd addresses, checks @aa:8 byte store/load, then
// sends the string through the serial transmitter with a subroutine (BSR)
// that stores the character to H'FFF0 and waits with the timer extension
// (timer 0 loaded with 255, TWAIT repeated DELAY times, DELAY read from the
// word at H'0100).  It then counts the 1 bits of the word at H'0102 (the
// "bit counter" test program), stores ones and zeros at H'0150/H'0151,
// sends '0' + ones through a JSR call, sets bit 4 of the byte at H'00F0
// in memory (BSET #4,@H'F0), copies the first five bytes of the string to
// H'0160 with EEPMOV and executes SLEEP.
package h8_prog_pkg;

  localparam int PROG_WORDS = 100;

  localparam logic [15:0] PROG [PROG_WORDS] = '{
    16'h7907, 16'h01E0,   // 00 MOV.W #H'01E0,R7     stack pointer
    16'h6B06, 16'h0100,   // 04 MOV.W @H'0100,R6     delay count
    16'hF0FF,             // 08 MOV.B #H'FF,R0H
    16'h5800,             // 0A TLD   R0H,T0         timer 0 period 256
    16'hF924,             // 0C MOV.B #H'24,R1L
    16'h1009,             // 0E SHLL  R1L            'H'
    16'h6A89, 16'h0140,   // 10 MOV.B R1L,@H'0140
    16'h891D,             // 14 ADD.B #H'1D,R1L      'e'
    16'h6A89, 16'h0141,   // 16 MOV.B R1L,@H'0141
    16'h8907,             // 1A ADD.B #7,R1L         'l'
    16'h6A89, 16'h0142,   // 1C
    16'h6A89, 16'h0143,   // 20
    16'h8903,             // 24 ADD.B #3,R1L         'o'
    16'h6A89, 16'h0144,   // 26
    16'hF940,             // 2A MOV.B #H'40,R1L
    16'h1109,             // 2C SHLR  R1L            ' '
    16'h6A89, 16'h0145,   // 2E
    16'hD963,             // 32 XOR.B #H'63,R1L      'C'
    16'h6A89, 16'h0146,   // 34
    16'hFA2C,             // 38 MOV.B #H'2C,R2L
    16'h08A9,             // 3A ADD.B R2L,R1L        'o'
    16'h6A89, 16'h0147,   // 3C
    16'hF203,             // 40 MOV.B #3,R2H
    16'h1829,             // 42 SUB.B R2H,R1L        'l'
    16'h6A89, 16'h0148,   // 44
    16'h8909,             // 48 ADD.B #9,R1L         'u'
    16'h6A89, 16'h0149,   // 4A
    16'h89F8,             // 4E ADD.B #H'F8,R1L      'm'
    16'h6A89, 16'h014A,   // 50
    16'hD90F,             // 54 XOR.B #H'0F,R1L      'b'
    16'h6A89, 16'h014B,   // 56
    16'h7039,             // 5A BSET  #3,R1L
    16'h1A09,             // 5C DEC.B R1L            'i'
    16'h6A89, 16'h014C,   // 5E
    16'h7239,             // 62 BCLR  #3,R1L         'a'
    16'h6A89, 16'h014D,   // 64
    16'hF900,             // 68 MOV.B #0,R1L
    16'h6A89, 16'h014E,   // 6A                      terminator
    16'hF85A,             // 6E MOV.B #H'5A,R0L
    16'h38F1,             // 70 MOV.B R0L,@H'F1
    16'h20F1,             // 72 MOV.B @H'F1,R0H
    16'h7905, 16'h0140,   // 74 MOV.W #H'0140,R5
    16'h6C59,             // 78 LOOP: MOV.B @R5+,R1L
    16'h4704,             // 7A BEQ  DONE
    16'h553C,             // 7C BSR  SEND
    16'h40F8,             // 7E BRA  LOOP
    16'h6B02, 16'h0102,   // 80 DONE: MOV.W @H'0102,R2
    16'hF310,             // 84 MOV.B #16,R3H
    16'hFB00,             // 86 MOV.B #0,R3L
    16'h100A,             // 88 BC: SHLL R2L
    16'h1202,             // 8A ROTXL R2H
    16'h9B00,             // 8C ADDX #0,R3L
    16'h1A03,             // 8E DEC.B R3H
    16'h46F6,             // 90 BNE  BC
    16'h6A8B, 16'h0150,   // 92 MOV.B R3L,@H'0150    ones
    16'hF310,             // 96 MOV.B #16,R3H
    16'h18B3,             // 98 SUB.B R3L,R3H
    16'h6A83, 16'h0151,   // 9A MOV.B R3H,@H'0151    zeros
    16'h0CB9,             // 9E MOV.B R3L,R1L
    16'h8930,             // A0 ADD.B #H'30,R1L
    16'h5E00, 16'h00BA,   // A2 JSR  @SEND
    16'h7FF0, 16'h7040,   // A6 BSET #4,@H'F0
    16'h7905, 16'h0140,   // AA MOV.W #H'0140,R5
    16'h7906, 16'h0160,   // AE MOV.W #H'0160,R6
    16'hFC05,             // B2 MOV.B #5,R4L
    16'h7B5C, 16'h598F,   // B4 EEPMOV             copy "Hello"
    16'h0180,             // B8 SLEEP
    16'h6B81, 16'hFFF0,   // BA SEND: MOV.W R1,@H'FFF0
    16'h0D64,             // BE MOV.W R6,R4
    16'h5700,             // C0 WAIT: TWAIT T0
    16'h1A0C,             // C2 DEC.B R4L
    16'h46FA,             // C4 BNE  WAIT
    16'h5470              // C6 RTS
  };

  localparam logic [15:0] BITS_WORD = 16'hB5C3;   // 9 ones, 7 zeros
  localparam logic [15:0] F0_INIT   = 16'hC300;   // word at H'00F0
  localparam string       MESSAGE   = "Hello Columbia9";

  // TWAIT repetitions per character: one character is 10 bit times of
  // 2*half_period board cycles = 10*half_period core cycles; each TWAIT
  // pass is 256 core cycles.  One spare pass covers the bit-clock phase.
  function automatic int delay_count(int half_period);
    return (10 * half_period + 255) / 256 + 1;
  endfunction

  function automatic int popcount16(logic [15:0] v);
    int n = 0;
    for (int i = 0; i < 16; i++) n += int'(v[i]);
    return n;
  endfunction
endpackage
