// csa_alu: carry-save add-shift-accumulate unit of a distributed-arithmetic processor, with
// pipeline registers and a bit-serial output.
//
// One inner product is formed from one data word of DW bits presented LSB first, one ROM word
// f per cycle: y = sum_{j<DW-1} F_j 2^j - F_(DW-1) 2^(DW-1). Each cycle every one of the W
// bit slices adds its ROM bit, its sum-register bit and its carry-register bit in a full adder.
// The sum moves one slice towards the LSB (the division by two of Horner's rule), the top slice
// keeps its own sum (sign extension), and each carry stays in its own slice; the sum leaving
// slice 0 is one finished low-order result bit. No carry ever ripples, so the cycle time is one
// full adder. On the sign-bit cycle (`sub`) the ROM word is inverted; the "+1" that completes
// the two's complement subtraction is folded in by inverting that cycle's low-order bit and,
// when that bit was 1, presetting the output adder's carry.
//
// The sum register starts every product at 2^(OUT_LSB-1) rather than zero; that constant passes
// through the shifts unchanged into the full result and makes the output word rounded to nearest
// (ties upwards) instead of truncated.
//
// At the end of the sign-bit cycle the sum and carry registers are re-initialised and their contents
// move into the pipeline registers, so the next inner product starts in the very next cycle.
// During the following DW cycles the result leaves on `out`, LSB first: the multiplexer first
// sends the low-order bits collected during the accumulation (full-result bits OUT_LSB..DW-1)
// and then the high-order bits that a serial full adder forms from the pipelined sum and carry
// words (bits DW..DW+OUT_LSB-1). `out` therefore carries result bits
// [OUT_LSB+DW-1 : OUT_LSB] of y + 2^(OUT_LSB-1), a DW-bit word, in the DW cycles after `sub`.
//
// Structure (slices, sum/carry registers with reset, parallel-load pipeline registers with a
// zero serial input, output full adder with carry register, multiplexer) follows the carry-save
// adder of the document. Collecting the low-order bits in a small register so that the whole
// output word leaves in one DW-cycle slot, the placement of the subtraction's "+1" and the
// rounding constant are this design's choices.
module csa_alu
  import dct_pkg::*;
#(
  parameter int unsigned W       = COEF_W,    // ROM word / ALU width
  parameter int unsigned DW      = DATA_W,    // data word length (cycles per inner product)
  parameter int unsigned OUT_LSB = COEF_FRAC  // lowest full-result bit sent out
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] f,    // ROM word of this cycle
  input  logic         sub,  // sign-bit cycle: subtract, then hand over to the pipeline
  output logic         out   // serial result, LSB first, DW cycles after sub
);
  localparam int unsigned LSPN = DW - OUT_LSB;  // result bits taken from the low part
  // Start value of the sum register: half an output LSB, so the output is rounded to nearest.
  localparam logic [W-1:0] RND = W'(1) << (OUT_LSB - 1);
  localparam int unsigned CW   = $clog2(DW + 1);

  // OUT_LSB high-order bits come from a W-bit sum/carry pair plus its carry: W+1 bits exist.
  if (OUT_LSB > W + 1 || OUT_LSB == 0 || OUT_LSB + 2 > DW) begin : g_bad
    $error("csa_alu: OUT_LSB out of range");
  end

  // Accumulator slices.
  logic [W-1:0] s_q, c_q;          // sum and carry registers
  logic [W-1:0] fx, s_v, cy_v;     // full adder inputs/outputs
  logic         lsb;               // finished low-order result bit of this cycle

  assign fx   = f ^ {W{sub}};
  assign s_v  = s_q ^ c_q ^ fx;
  assign cy_v = (s_q & c_q) | (s_q & fx) | (c_q & fx);
  assign lsb  = s_v[0] ^ sub;

  logic [LSPN-2:0] l_q;            // low-order bits collected during the accumulation

  // Pipeline registers and output adder.
  logic [LSPN-1:0] pl_q;
  logic [W-1:0]    ps_q, pc_q;
  logic            pcy_q;
  logic [CW-1:0]   ocnt_q;
  logic            msp_phase;

  assign msp_phase = (ocnt_q >= CW'(LSPN));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q    <= RND;
      c_q    <= '0;
      l_q    <= '0;
      pl_q   <= '0;
      ps_q   <= '0;
      pc_q   <= '0;
      pcy_q  <= 1'b0;
      ocnt_q <= CW'(DW);
    end else begin
      l_q <= {lsb, l_q[LSPN-2:1]};
      if (sub) begin
        s_q    <= RND;
        c_q    <= '0;
        pl_q   <= {lsb, l_q};
        ps_q   <= {s_v[W-1], s_v[W-1:1]};
        pc_q   <= cy_v;
        pcy_q  <= s_v[0];
        ocnt_q <= '0;
      end else begin
        s_q <= {s_v[W-1], s_v[W-1:1]};
        c_q <= cy_v;
        if (!msp_phase) begin
          pl_q <= {1'b0, pl_q[LSPN-1:1]};
        end else begin
          ps_q  <= {1'b0, ps_q[W-1:1]};
          pc_q  <= {1'b0, pc_q[W-1:1]};
          pcy_q <= (ps_q[0] & pc_q[0]) | (ps_q[0] & pcy_q) | (pc_q[0] & pcy_q);
        end
        if (ocnt_q != CW'(DW)) ocnt_q <= ocnt_q + 1'b1;
      end
    end
  end

  assign out = msp_phase ? (ps_q[0] ^ pc_q[0] ^ pcy_q) : pl_q[0];

endmodule
