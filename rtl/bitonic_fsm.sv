// bitonic_fsm: state machine of the factorized Bitonic sorting network.
//
// With the maximum factorization level the network owns only M/2 CS
// operators and re-uses them for every stage. Each stage takes three clock
// cycles:
//   gather  - the Map multiplexers load the CS input registers (enable en1)
//             from the working registers, or from the sorter inputs in stage 0;
//   compare - the CS results are captured in the output registers (en2);
//   scatter - the results are written back to the working registers.
// The gather of stage 0 happens on the same edge that samples `start`, so a
// run of S stages finishes 3*S edges after `start` is sampled (18 for the
// document's 8-input example). `done` is a one-cycle pulse raised together
// with the last scatter, i.e. when the sorted list becomes visible.
// `last_stage` (number of stages minus one) is sampled with `start`; the
// sorter uses it to stop early when fewer SMs than inputs are present.
// The three-phase stage split is this design's choice; the document gives
// the state machine only as a block and the 18-cycle result.
// The assertions of this design are disabled during reset, which some lint tools report
// as rst_n being used both synchronously and asynchronously; the flops
// themselves all reset asynchronously.
module bitonic_fsm #(
  parameter int STAGES = 21  // stages of the full network, P(P+1)/2
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic [$clog2(STAGES+1)-1:0] last_stage,
  output logic                        gather_en,
  output logic                        gather_ext,  // stage 0: take the sorter inputs
  output logic                        compare_en,
  output logic                        scatter_en,
  output logic [$clog2(STAGES+1)-1:0] stage,
  output logic                        busy,
  output logic                        done
);
  typedef enum logic [1:0] {S_IDLE, S_GATHER, S_COMPARE, S_SCATTER} state_t;
  localparam int SW = $clog2(STAGES + 1);

  state_t        state;
  logic [SW-1:0] last_q;

  always_comb begin
    gather_en  = (state == S_GATHER) || (state == S_IDLE && start);
    gather_ext = (state == S_IDLE && start);
    compare_en = (state == S_COMPARE);
    scatter_en = (state == S_SCATTER);
    busy       = (state != S_IDLE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      stage  <= '0;
      last_q <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state  <= S_COMPARE;
          stage  <= '0;
          last_q <= (last_stage >= SW'(STAGES)) ? SW'(STAGES - 1) : last_stage;
        end
        S_GATHER:  state <= S_COMPARE;
        S_COMPARE: state <= S_SCATTER;
        S_SCATTER: begin
          if (stage == last_q) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            stage <= stage + 1'b1;
            state <= S_GATHER;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A new list may only be started while the network is idle.
  a_stage_range: assert property (@(posedge clk) disable iff (!rst_n) stage < SW'(STAGES));
endmodule
