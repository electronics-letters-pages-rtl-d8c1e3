// transient_gen: interference waveform player for the burst-error test bed.
//
// The workstation writes one interference transient, sample by sample, into
// a table (tbl_we/tbl_addr/tbl_wdata) and sets the index of its last sample
// (last_addr). A `trigger` pulse starts a playback: on each following bit
// tick (the transmitter's bit clock, as a clock enable) the next table
// sample is put on dac_code, which drives the D/A convertor whose output is
// injected at the LED drive. After the last sample the output returns to the
// idle code, mid-scale in offset binary (zero volts), and `busy` falls.
//
// Intended table contents are samples of the two interferers studied,
// A*t*exp(-t/T) and A*exp(-t/T)*sin(wt), at one sample per bit, so the decay
// constant T is set in bits; the table computation belongs to the host.
// The player, the table and the one-sample-per-bit rate follow the test bed
// description; table depth, sample width, the idle code and the trigger
// interface are this design's choices.
//
// Timing: a trigger while idle arms the player; the first tick after it
// presents sample 0, tick j presents sample j-1, and the tick after
// sample last_addr presents the idle code again. Triggers while busy are
// ignored. Table writes may happen at any time and take effect at once.
module transient_gen #(
  parameter int unsigned ADDR_W = 10,  // table of 2^ADDR_W samples
  parameter int unsigned DW     = 8    // D/A convertor code width
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tick,       // one pulse per transmitted bit
  // table load from the workstation
  input  logic              tbl_we,
  input  logic [ADDR_W-1:0] tbl_addr,
  input  logic [DW-1:0]     tbl_wdata,
  // playback control
  input  logic [ADDR_W-1:0] last_addr,
  input  logic              trigger,
  output logic              busy,
  output logic [DW-1:0]     dac_code
);
  localparam logic [DW-1:0] IDLE_CODE = DW'(1) << (DW - 1);

  logic [DW-1:0]     table_q [2**ADDR_W];
  logic [ADDR_W-1:0] addr_q;
  logic [ADDR_W-1:0] last_q;

  always_ff @(posedge clk) begin
    if (tbl_we) table_q[tbl_addr] <= tbl_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      addr_q   <= '0;
      last_q   <= '0;
      dac_code <= IDLE_CODE;
    end else begin
      if (tick) begin
        if (busy) begin
          dac_code <= table_q[addr_q];
          if (addr_q == last_q) busy <= 1'b0;
          else                  addr_q <= addr_q + 1'b1;
        end else begin
          dac_code <= IDLE_CODE;
        end
      end
      if (trigger && !busy) begin
        busy   <= 1'b1;
        addr_q <= '0;
        last_q <= last_addr;
      end
    end
  end
endmodule
