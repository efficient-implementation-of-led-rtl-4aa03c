// led_key_register: the key register that feeds every pipeline lane.
//
// The document's pipeline figure shows the 128-bit input key captured in one key box
// that both lanes read. Here key_in is captured on a rising clock edge when load is
// high; the register clears to zero on reset (this design's choice). The key must stay
// unchanged while blocks are in the pipeline, because the lanes do not carry a copy of
// the key along with each block. Interface: clk, active-low asynchronous rst_n, load,
// key_in; key_q is the stored key, valid one cycle after load.
module led_key_register #(
  parameter int unsigned KEY_BITS = 128
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic [KEY_BITS-1:0] key_in,
  output logic [KEY_BITS-1:0] key_q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    key_q <= '0;
    else if (load) key_q <= key_in;
  end

endmodule
