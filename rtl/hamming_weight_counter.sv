// hamming_weight_counter: Hamming weight of the error polynomial of a word.
//
// It counts the non-zero symbols of e(x) over one word, i.e. the Hamming
// distance between the received word and the decoder's output. A fault-free
// decoder never changes more than T symbols (property 2), so a weight above
// T reveals a fault. The document gives only this function; the counter
// and comparator are the plain way to do it.
//
// Interface: the stream in_valid/in_first/in_last/in_err follows the
// decoder output, one symbol per valid cycle. done pulses one cycle after
// the cycle holding in_last; weight and too_heavy are registered and hold
// their value until the next word ends.
module hamming_weight_counter #(
  parameter int unsigned M = 8,
  parameter int unsigned N = 255,
  parameter int unsigned T = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic                   in_first,
  input  logic                   in_last,
  input  logic [M-1:0]           in_err,
  output logic                   done,
  output logic [$clog2(N+1)-1:0] weight,
  output logic                   too_heavy
);

  localparam int unsigned WW = $clog2(N + 1);

  logic [WW-1:0] acc, acc_next;

  assign acc_next = (in_first ? '0 : acc) + WW'(in_err != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      weight    <= '0;
      too_heavy <= 1'b0;
      done      <= 1'b0;
    end else begin
      done <= in_valid && in_last;
      if (in_valid) acc <= acc_next;
      if (in_valid && in_last) begin
        weight    <= acc_next;
        too_heavy <= acc_next > WW'(T);
      end
    end
  end

endmodule
