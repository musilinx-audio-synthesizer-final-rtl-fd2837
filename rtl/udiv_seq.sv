// udiv_seq: sequential restoring unsigned divider, one quotient bit per clock.
//
// `start` loads numerator and denominator; NUM_W clocks later `done` pulses for
// one cycle with quo = num / den (the remainder is dropped). `busy` is high in
// between and a `start` while busy is ignored. Division by zero gives an
// all-ones quotient. Used by the oscillator to scale its phase counter to the
// 16-bit amplitude once per sample; this helper is an implementation choice.
module udiv_seq #(
  parameter int NUM_W = 33,
  parameter int DEN_W = 17
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [NUM_W-1:0] num,
  input  logic [DEN_W-1:0] den,
  output logic             busy,
  output logic             done,
  output logic [NUM_W-1:0] quo
);

  localparam int CNT_W = $clog2(NUM_W + 1);

  logic [NUM_W-1:0] n_q;
  logic [DEN_W-1:0] d_q;
  logic [DEN_W:0]   rem_q;
  logic [CNT_W-1:0] cnt_q;
  logic [DEN_W:0]   trial;
  logic [DEN_W:0]   shifted;

  assign shifted = {rem_q[DEN_W-1:0], n_q[NUM_W-1]};
  assign trial   = shifted - {1'b0, d_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_q   <= '0;
      d_q   <= '0;
      rem_q <= '0;
      cnt_q <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
      quo   <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        n_q   <= num;
        d_q   <= den;
        rem_q <= '0;
        cnt_q <= CNT_W'(NUM_W);
        busy  <= 1'b1;
      end else if (busy) begin
        // shift in next numerator bit; quotient bits replace numerator bits
        if (!trial[DEN_W]) begin
          rem_q <= trial;
          n_q   <= {n_q[NUM_W-2:0], 1'b1};
        end else begin
          rem_q <= shifted;
          n_q   <= {n_q[NUM_W-2:0], 1'b0};
        end
        cnt_q <= cnt_q - 1'b1;
        if (cnt_q == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
          quo  <= (!trial[DEN_W]) ? {n_q[NUM_W-2:0], 1'b1} : {n_q[NUM_W-2:0], 1'b0};
        end
      end
    end
  end

endmodule
