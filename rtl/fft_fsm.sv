// fft_fsm: controller of the ordered FFT core (FSM with the address counter).
//
// One counter drives all address generation. Its more significant section
// HS counts FFT stages, its less significant section LS counts butterflies
// (or input/output pairs) within a stage. The controller steps through
//   IDLE -> LOAD (N/2 input pairs, counted on din_valid)
//        -> PROC (log2(N) stages of N/2 butterflies, one per clock)
//        -> OUT  (N/2 output pairs, one per clock) -> IDLE.
// Outputs, all for the address slot of the current cycle (the core delays
// the write-side signals by the one-cycle RAM read latency):
//   hs, ls  counter sections. During LOAD, ls is the counter bit-reversed,
//           which with stage-0 addressing writes input x[c] and x[c+N/2]
//           to their bit-reversed locations. During OUT, hs is held at the
//           last stage, which reads X[c] and X[c+N/2].
//   asel    RMUX select, 1 during the last stage only (decoded from HS).
//   sel     MUXIN select, 1 while loading.
//   we      this slot writes the RAMs (after the read latency).
//   rd_out  this slot reads an output pair.
//   done    registered, high in the cycle the last output pair is valid.
// The LOAD/PROC/OUT sequencing, the counter split and ASEL/SEL follow the
// document; the state encoding, the start/din_valid handshake, the
// bit-reversed loading and the output order are this design's choices.
module fft_fsm #(
  parameter int N = 32,
  localparam int AW  = $clog2(N),
  localparam int LSW = AW - 1,
  localparam int HSW = $clog2(AW)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic           din_valid,
  output logic [HSW-1:0] hs,
  output logic [LSW-1:0] ls,
  output logic           asel,
  output logic           sel,
  output logic           we,
  output logic           rd_out,
  output logic           busy,
  output logic           done
);
  typedef enum logic [1:0] {IDLE, LOAD, PROC, OUT} state_t;

  localparam logic [HSW-1:0] LAST_STAGE = HSW'(AW - 1);
  localparam logic [LSW-1:0] LAST_BF    = '1;

  state_t         state;
  logic [HSW-1:0] hs_q;
  logic [LSW-1:0] ls_q;

  function automatic logic [LSW-1:0] bitrev(input logic [LSW-1:0] v);
    for (int k = 0; k < LSW; k++) bitrev[k] = v[LSW-1-k];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      hs_q  <= '0;
      ls_q  <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          state <= LOAD;
          hs_q  <= '0;
          ls_q  <= '0;
        end
        LOAD: if (din_valid) begin
          ls_q <= ls_q + 1'b1;
          if (ls_q == LAST_BF) state <= PROC;
        end
        PROC: begin
          ls_q <= ls_q + 1'b1;
          if (ls_q == LAST_BF) begin
            if (hs_q == LAST_STAGE) begin
              state <= OUT;
            end else begin
              hs_q <= hs_q + 1'b1;
            end
          end
        end
        OUT: begin
          ls_q <= ls_q + 1'b1;
          if (ls_q == LAST_BF) begin
            state <= IDLE;
            hs_q  <= '0;
            done  <= 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  always_comb begin
    hs     = hs_q;
    ls     = (state == LOAD) ? bitrev(ls_q) : ls_q;
    asel   = (state == PROC) && (hs_q == LAST_STAGE);
    sel    = (state == LOAD);
    we     = ((state == LOAD) && din_valid) || (state == PROC);
    rd_out = (state == OUT);
    busy   = (state != IDLE);
  end
endmodule
