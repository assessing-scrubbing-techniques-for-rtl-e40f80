000102030405060708090a0b0c0d0e0f00112233445566778899aabbccddeeff69c4e0d86a7b0430d8cdb78070b4c55a
2b7e151628aed2a6abf7158809cf4f3c3243f6a8885a308d313198a2e03707343925841d02dc09fbdc118597196a0b32
00000000000000000000000000000000800000000000000000000000000000003ad78e726c1ec02b7ebfe92b23d9ec34
00000000000000000000000000000000c0000000000000000000000000000000aae5939c8efdf2f04e60b9fe7117b2c2
00000000000000000000000000000000e0000000000000000000000000000000f031d4d74f5dcbf39daaf8ca3af6e527
00000000000000000000000000000000f000000000000000000000000000000096d9fd5cc4f07441727df0f33e401a36
00000000000000000000000000000000f800000000000000000000000000000030ccdb044646d7e1f3ccea3dca08b8c0
00000000000000000000000000000000fc00000000000000000000000000000016ae4ce5042a67ee8e177b7c587ecc82
00000000000000000000000000000000fe000000000000000000000000000000b6da0bb11a23855d9c5cb1b4c6412e0a
00000000000000000000000000000000ff000000000000000000000000000000db4f1aa530967d6732ce4715eb0ee24b
00000000000000000000000000000000ff800000000000000000000000000000a81738252621dd180a34f3455b4baa2f
00000000000000000000000000000000ffc0000000000000000000000000000077e2b508db7fd89234caf7939ee5621a
00000000000000000000000000000000ffe00000000000000000000000000000b8499c251f8442ee13f0933b688fcd19
00000000000000000000000000000000fff00000000000000000000000000000965135f8a81f25c9d630b17502f68e53
00000000000000000000000000000000fff800000000000000000000000000008b87145a01ad1c6cede995ea3670454f
00000000000000000000000000000000fffc00000000000000000000000000008eae3b10a0c8ca6d1d3b0fa61e56b0b2
00000000000000000000000000000000fffe000000000000000000000000000064b4d629810fda6bafdf08f3b0d8d2c5
00000000000000000000000000000000ffff0000000000000000000000000000d7e5dbd3324595f8fdc7d7c571da6c2a
00000000000000000000000000000000ffff8000000000000000000000000000f3f72375264e167fca9de2c1527d9606
00000000000000000000000000000000ffffc0000000000000000000000000008ee79dd4f401ff9b7ea945d86666c13b
00000000000000000000000000000000ffffe000000000000000000000000000dd35cea2799940b40db3f819cb94c08b
00000000000000000000000000000000fffff0000000000000000000000000006941cb6b3e08c2b7afa581ebdd607b87
00000000000000000000000000000000fffff8000000000000000000000000002c20f439f6bb097b29b8bd6d99aad799
00000000000000000000000000000000fffffc00000000000000000000000000625d01f058e565f77ae86378bd2c49b3
00000000000000000000000000000000fffffe00000000000000000000000000c0b5fd98190ef45fbb4301438d095950
00000000000000000000000000000000ffffff0000000000000000000000000013001ff5d99806efd25da34f56be854b
00000000000000000000000000000000ffffff800000000000000000000000003b594c60f5c8277a5113677f94208d82
00000000000000000000000000000000ffffffc0000000000000000000000000e9c0fc1818e4aa46bd2e39d638f89e05
00000000000000000000000000000000ffffffe0000000000000000000000000f8023ee9c3fdc45a019b4e985c7e1a54
00000000000000000000000000000000fffffff000000000000000000000000035f40182ab4662f3023baec1ee796b57
00000000000000000000000000000000fffffff80000000000000000000000003aebbad7303649b4194a6945c6cc3694
00000000000000000000000000000000fffffffc000000000000000000000000a2124bea53ec2834279bed7f7eb0f938
00000000000000000000000000000000fffffffe000000000000000000000000b9fb4399fa4facc7309e14ec98360b0a
80000000000000000000000000000000000000000000000000000000000000000edd33d3c621e546455bd8ba1418bec8
c0000000000000000000000000000000000000000000000000000000000000004bc3f883450c113c64ca42e1112a9e87
e00000000000000000000000000000000000000000000000000000000000000072a1da770f5d7ac4c9ef94d822affd97
f000000000000000000000000000000000000000000000000000000000000000970014d634e2b7650777e8e84d03ccd8
f800000000000000000000000000000000000000000000000000000000000000f17e79aed0db7e279e955b5f493875a7
fc000000000000000000000000000000000000000000000000000000000000009ed5a75136a940d0963da379db4af26a
fe00000000000000000000000000000000000000000000000000000000000000c4295f83465c7755e8fa364bac6a7ea5
ff00000000000000000000000000000000000000000000000000000000000000b1d758256b28fd850ad4944208cf1155
ff8000000000000000000000000000000000000000000000000000000000000042ffb34c743de4d88ca38011c990890b
ffc00000000000000000000000000000000000000000000000000000000000009958f0ecea8b2172c0c1995f9182c0f3
ffe0000000000000000000000000000000000000000000000000000000000000956d7798fac20f82a8823f984d06f7f5
fff0000000000000000000000000000000000000000000000000000000000000a01bf44f2d16be928ca44aaf7b9b106b
fff8000000000000000000000000000000000000000000000000000000000000b5f1a33e50d40d103764c76bd4c6b6f8
fffc0000000000000000000000000000000000000000000000000000000000002637050c9fc0d4817e2d69de878aee8d
fffe000000000000000000000000000000000000000000000000000000000000113ecbe4a453269a0dd26069467fb5b5
ffff00000000000000000000000000000000000000000000000000000000000097d0754fe68f11b9e375d070a608c884
ffff800000000000000000000000000000000000000000000000000000000000c6a0b3e998d05068a5399778405200b4
ffffc00000000000000000000000000000000000000000000000000000000000df556a33438db87bc41b1752c55e5e49
ffffe0000000000000000000000000000000000000000000000000000000000090fb128d3a1af6e548521bb962bf1f05
fffff0000000000000000000000000000000000000000000000000000000000026298e9c1db517c215fadfb7d2a8d691
fffff80000000000000000000000000000000000000000000000000000000000a6cb761d61f8292d0df393a279ad0380
fffffc000000000000000000000000000000000000000000000000000000000012acd89b13cd5f8726e34d44fd486108
fffffe000000000000000000000000000000000000000000000000000000000095b1703fc57ba09fe0c3580febdd7ed4
ffffff0000000000000000000000000000000000000000000000000000000000de11722d893e9f9121c381becc1da59a
ffffff80000000000000000000000000000000000000000000000000000000006d114ccb27bf391012e8974c546d9bf2
ffffffc0000000000000000000000000000000000000000000000000000000005ce37e17eb4646ecfac29b9cc38d9340
ffffffe00000000000000000000000000000000000000000000000000000000018c1b6e2157122056d0243d8a165cddb
fffffff00000000000000000000000000000000000000000000000000000000099693e6a59d1366c74d823562d7e1431
fffffff8000000000000000000000000000000000000000000000000000000006c7c64dc84a8bba758ed17eb025a57e3
fffffffc00000000000000000000000000000000000000000000000000000000e17bc79f30eaab2fac2cbbe3458d687a
fffffffe000000000000000000000000000000000000000000000000000000001114bc2028009b923f0b01915ce5e7c4
