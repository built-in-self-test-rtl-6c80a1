// Tier-1 test source of the ILV BIST: turns the single source Vin into
// complementary values on adjacent ILVs, 1010... for Vin=1 and 0101... for
// Vin=0, so ILV i receives Vin ^ i[0].
//
// As in the method, the values come from a chain of inverters fed by Vin
// (N_ILV-1 inverters for one unbroken chain). A long chain limits how fast
// Vin can toggle, so the chain is broken into sub-chains of CHAIN_LEN
// inverters; each sub-chain serves CHAIN_LEN+1 ILVs and its head is fed from
// Vin directly (head on an even ILV) or through one extra inverter (odd ILV),
// keeping neighbours across a sub-chain boundary complementary. CHAIN_LEN=9
// is the chain length used in the method's benchmark insertion; CHAIN_LEN=0
// selects one unbroken chain. Reading "chain of length nine" as sub-chains of
// nine inverters is this design's choice.
//
// Interface: vin in, pattern[N_ILV] out. Purely combinational.
module ilv_inverter_chain #(
  parameter int unsigned N_ILV     = 32,
  parameter int unsigned CHAIN_LEN = 9
) (
  input  logic             vin,
  output logic [N_ILV-1:0] pattern
);

  // ILVs served by one sub-chain (head plus one per inverter).
  localparam int unsigned SEG = (CHAIN_LEN == 0) ? N_ILV : CHAIN_LEN + 1;

  for (genvar i = 0; i < N_ILV; i++) begin : g_ilv
    if (i % SEG == 0) begin : g_head
      // Sub-chain head: Vin itself, or one inverter when it sits on an odd ILV.
      if (i % 2 == 0) begin : g_even
        assign pattern[i] = vin;
      end else begin : g_odd
        assign pattern[i] = ~vin;
      end
    end else begin : g_inv
      // One inverter of the chain.
      assign pattern[i] = ~pattern[i-1];
    end
  end

endmodule
