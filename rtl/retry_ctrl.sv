// retry_ctrl: tells transient from permanent faults for one PE.
//
// The PE's on-line self-test reports one result per checked task
// (chk_valid, with chk_err set on a mismatch). A first error does not
// reconfigure anything: the PE retries the task (retry_req pulses) and the
// neighbours are suspended (`retrying`). If a retry passes, the fault was
// transient and work continues (`transient` pulses). If MAX_RETRY retries in
// a row fail, the fault is declared permanent (`declare` pulses) and the PE
// goes dormant, acting only as a connecting element while it keeps testing
// itself; the first passing self-test there reports recovery (`recover`
// pulses) so the PE can be reactivated.
//
// Retry, declaration after a bound, dormant self-testing and reactivation
// follow the published run-time scheme. The bound's default of 10 is this
// design's reading of the scheme's figures: a fault is declared permanent
// once it outlasts the average transient duration, given as 10
// communication clocks; here one retry stands for one such clock.
//
// States: RUN -> RETRY on an error; RETRY -> RUN on a pass, -> DORMANT after
// MAX_RETRY failed retries; DORMANT -> RUN on a pass. All outputs but the
// pulses are state decodes. Synchronous active-low reset to RUN.
module retry_ctrl #(
  parameter int MAX_RETRY = 10
) (
  input  logic clk,
  input  logic rst_n,
  input  logic chk_valid,
  input  logic chk_err,
  output logic retrying,
  output logic dormant,
  output logic retry_req,
  output logic transient,
  output logic declare,
  output logic recover
);

  typedef enum logic [1:0] {RUN, RETRY, DORMANT} state_e;

  localparam int RW = $clog2(MAX_RETRY + 1);

  state_e        state;
  logic [RW-1:0] fails;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= RUN;
      fails     <= '0;
      retry_req <= 1'b0;
      transient <= 1'b0;
      declare   <= 1'b0;
      recover   <= 1'b0;
    end else begin
      retry_req <= 1'b0;
      transient <= 1'b0;
      declare   <= 1'b0;
      recover   <= 1'b0;
      if (chk_valid) begin
        unique case (state)
          RUN: if (chk_err) begin
            state     <= RETRY;
            fails     <= '0;
            retry_req <= 1'b1;
          end
          RETRY: begin
            if (!chk_err) begin
              state     <= RUN;
              transient <= 1'b1;
            end else if (32'(fails) + 1 >= MAX_RETRY) begin
              state   <= DORMANT;
              declare <= 1'b1;
            end else begin
              fails     <= fails + 1'b1;
              retry_req <= 1'b1;
            end
          end
          DORMANT: if (!chk_err) begin
            state   <= RUN;
            recover <= 1'b1;
          end
          default: state <= RUN;
        endcase
      end
    end
  end

  assign retrying = (state == RETRY);
  assign dormant  = (state == DORMANT);

endmodule
