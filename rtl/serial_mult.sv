// Serial (iterative) shift-and-add multiplier: p = A * B in L clock cycles.
//
// A start pulse loads A, widened to K+L bits (sign-extended when fill = 1,
// zero-extended when fill = 0), and B, clears the accumulator (ACU) and sets
// the L-phase clock generator to phase 0. In each of the next L cycles the
// active phase j selects bit b_j; the shifted A passes through a row of K+L
// AND gates whose common input is b_j and is added into the K+L-bit ACU,
// after which A is shifted left by one bit. B is read as unsigned, A as two's
// complement when fill = 1.
//
// Timing: start is sampled on a clock edge; the L additions happen on the
// following L edges; done goes high on the edge of the last addition and
// stays high, with p valid, until the next start. busy is high in between.
// The ACU has K+L one-bit adders, one per AND gate. A start while busy
// restarts the multiplication.
module serial_mult #(
  parameter int unsigned K = 32,  // width of A (coefficient)
  parameter int unsigned L = 32   // width of B (sample), number of phases
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [K-1:0]   a,
  input  logic [L-1:0]   b,
  input  logic           fill,
  output logic           busy,
  output logic           done,
  output logic [K+L-1:0] p
);
  localparam int unsigned PW = K + L;

  logic [PW-1:0] a_sh;
  logic [L-1:0]  b_reg;
  logic [L-1:0]  phase;
  logic [$clog2(L)-1:0] unused_idx;
  logic          bit_sel;
  logic [PW-1:0] addend;

  multiphase_gen #(.PHASES(L)) u_phase (
    .clk  (clk),
    .rst_n(rst_n),
    .clr  (start),
    .adv  (busy),
    .phase(phase),
    .idx  (unused_idx)
  );

  // Common input of the AND gates, switched between the bits of B.
  assign bit_sel = |(b_reg & phase);
  assign addend  = a_sh & {PW{bit_sel}};

  acu #(.W(PW)) u_acu (
    .clk   (clk),
    .rst_n (rst_n),
    .clr   (start),
    .en    (busy),
    .addend(addend),
    .acc   (p)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_sh  <= '0;
      b_reg <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else if (start) begin
      a_sh  <= {{L{fill & a[K-1]}}, a};
      b_reg <= b;
      busy  <= 1'b1;
      done  <= 1'b0;
    end else if (busy) begin
      a_sh <= a_sh << 1;
      if (phase[L-1]) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end
endmodule
