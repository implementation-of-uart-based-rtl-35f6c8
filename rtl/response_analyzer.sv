// Test response analyzer: comparator, failure record and signature.
//
// Each check pulse compares a response (actual) with the pattern that was
// sent (expected). A mismatch, or a check with miss high (the response never
// arrived or arrived with a framing error), counts as a failure: fail_count
// is incremented, and the first failure records its pattern index in
// fault_addr and sets fault_seen. Every response is also folded into an
// 8-bit multiple-input signature register (the response compaction unit),
// signature <= step(signature) XOR actual, with the LFSR's feedback. The
// design names a comparator, a response analyzer that locates the failing
// pattern and a compression unit; the counter, the first-failure record and
// the signature register are this design's simplest way to provide them.
//
// Timing: all outputs registered; clear (synchronous) empties them.
module response_analyzer #(
  parameter logic [7:0] POLY     = 8'h63,
  parameter int unsigned CNT_BITS = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                clear,
  input  logic                check,
  input  logic                miss,
  input  logic [7:0]          expected,
  input  logic [7:0]          actual,
  input  logic [7:0]          index,
  output logic [CNT_BITS-1:0] fail_count,
  output logic [7:0]          fault_addr,
  output logic                fault_seen,
  output logic [7:0]          signature
);

  logic       fail;
  logic [7:0] sig_step;

  assign fail = miss || (expected != actual);

  always_comb begin
    sig_step[0] = signature[7];
    for (int i = 1; i < 8; i++)
      sig_step[i] = signature[i-1] ^ (POLY[i] & signature[7]);
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      fail_count <= '0;
      fault_addr <= '0;
      fault_seen <= 1'b0;
      signature  <= '0;
    end else if (check) begin
      signature <= sig_step ^ actual;
      if (fail) begin
        if (fail_count != '1) fail_count <= fail_count + 1'b1;
        if (!fault_seen) begin
          fault_addr <= index;
          fault_seen <= 1'b1;
        end
      end
    end
  end

endmodule
