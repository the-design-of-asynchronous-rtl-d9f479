// Control counter: attaches the dual-rail sample index to each input sample.
//
// A modulo-2^IW counter advances at the end of every input handshake (falling
// edge of the input acknowledge). Its value is presented as a dual-rail tag
// whose rails are gated by the completion of the input data, so the tag turns
// VALID with the data and EMPTY with it. The stages steer every sample by the
// bits of this tag. Timing assumption: the counter settles between the fall
// of the acknowledge and the next sample becoming VALID (the sender starts a
// new sample only after it has seen the acknowledge fall). The source design
// has a control counter that counts the samples a stage receives; using one
// counter at the input and carrying its value as a tag is this
// implementation's choice.
module dr_index_counter #(
  parameter int unsigned IW = 3
) (
  input  logic          rst,
  input  logic          data_valid,   // completion of the input sample
  input  logic          ack,          // acknowledge of the input channel
  output logic [IW-1:0] idx_t,
  output logic [IW-1:0] idx_f,
  output logic [IW-1:0] count
);
  always_ff @(negedge ack or posedge rst) begin
    if (rst) count <= '0;
    else     count <= count + 1'b1;
  end
  assign idx_t = count & {IW{data_valid}};
  assign idx_f = ~count & {IW{data_valid}};
endmodule
